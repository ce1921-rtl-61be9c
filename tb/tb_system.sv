// tb_system: end-to-end test of the DE10-Lite computer at its default
// parameters, running the DE10ROM1 program (sum of 1..n with n read from the
// sliders, result to the seven-segment display, MEM[4] = (sum >= 32) to the
// LEDs). For each slider value (10, 15 and 3 as in the board test, 0, the
// largest value 1023 and random values) the testbench
//   - holds SYSRST low and checks that every output register is clear,
//   - releases SYSRST and checks that the processor starts on the third clock
//     edge (two edges in the reset synchronizer),
//   - counts the clock cycles to the final loop and compares them with the
//     instruction count of the program path (one instruction per cycle),
//   - checks the displays against sum = n(n+1)/2 worked out here, and that the
//     SEG7 and LED registers were each written exactly once,
//   - moves the sliders afterwards and checks the displays hold.
// One run is interrupted by pressing SYSRST between clock edges, which must
// clear the outputs at once. Each mechanism (taken and untaken branch,
// condition-failed instruction, flag write, LDR from memory and from the
// sliders, STR to memory, LED and SEG7, synchronized reset release and
// asynchronous reset) is counted, and one that never happened is a failure.
module tb_system;
  logic CLK, SYSRST;
  logic [9:0] SLIDERS, LEDS;
  logic [7:0] SEG [6];
  logic [31:0] WD3, PC4, INSTR, BRADDR;
  logic PCSRC, PCWR, REGDST, REGWR, ALUSRCB, CPSRWR, MEMRD, MEMWR, REGSRC, C, V, N, Z;
  logic [1:0] EXTS;
  logic [2:0] ALUS;
  logic [3:0] ROTATE;
  logic LD2, LD1, LD0, DATAS;
  int checks = 0, failures = 0;

  system dut (
    .CLK(CLK), .SYSRST(SYSRST), .SLIDERS(SLIDERS), .LEDS(LEDS),
    .SEG0(SEG[0]), .SEG1(SEG[1]), .SEG2(SEG[2]), .SEG3(SEG[3]), .SEG4(SEG[4]), .SEG5(SEG[5]),
    .WD3(WD3), .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMRD(MEMRD), .MEMWR(MEMWR),
    .REGSRC(REGSRC), .ROTATE(ROTATE), .C(C), .V(V), .N(N), .Z(Z), .PC4(PC4),
    .INSTR(INSTR), .BRADDR(BRADDR), .LD2(LD2), .LD1(LD1), .LD0(LD0), .DATAS(DATAS));

  initial CLK = 0;
  always #10 CLK = ~CLK;   // 20 ns period (50 MHz) with 1 ns time units

  // mechanism counters
  int n_br_taken = 0, n_br_not = 0, n_cond_fail = 0, n_flags = 0;
  int n_ldr_mem = 0, n_ldr_sld = 0, n_str_mem = 0, n_str_led = 0, n_str_seg = 0;
  int n_sync = 0, n_async = 0;
  int run_led = 0, run_seg = 0;
  logic counting = 0;

  always @(posedge CLK) if (counting) begin
    if (INSTR[27:25] == 3'b101) begin
      if (PCSRC) n_br_taken++; else n_br_not++;
    end
    if (INSTR[31:28] != 4'hE && !REGWR && !CPSRWR && !PCSRC && !MEMWR && !MEMRD) n_cond_fail++;
    if (CPSRWR) n_flags++;
    if (MEMRD && DATAS) n_ldr_mem++;
    if (MEMRD && !DATAS) n_ldr_sld++;
    if (LD2) n_str_mem++;
    if (LD1) begin n_str_led++; run_led++; end
    if (LD0) begin n_str_seg++; run_seg++; end
  end

  function automatic logic [7:0] glyph(input logic [3:0] d);
    string lit;
    logic [7:0] v;
    case (d)
      4'h0: lit = "012345";  4'h1: lit = "12";      4'h2: lit = "01346";
      4'h3: lit = "01236";   4'h4: lit = "1256";    4'h5: lit = "02356";
      4'h6: lit = "023456";  4'h7: lit = "012";     4'h8: lit = "0123456";
      4'h9: lit = "012356";  4'hA: lit = "012456";  4'hB: lit = "23456";
      4'hC: lit = "0345";    4'hD: lit = "12346";   4'hE: lit = "03456";
      default: lit = "0456";
    endcase
    v = 8'hFF;
    for (int i = 0; i < lit.len(); i++) v[lit[i] - "0"] = 1'b0;
    return v;
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL sliders=%0d %s: got %h expected %h", SLIDERS, what, got, exp);
    end
  endtask

  task automatic check_display(input logic [31:0] value, input logic [9:0] leds, input string what);
    for (int k = 0; k < 6; k++) check({24'b0, SEG[k]}, {24'b0, glyph(value[4*k +: 4])}, what);
    check({22'b0, LEDS}, {22'b0, leds}, what);
  endtask

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs the program once for slider value n; with interrupt_at > 0 the reset
  // button is pressed after that many instructions instead.
  task automatic run(input int n, input int interrupt_at);
    int unsigned sum, exp_cycles, edges;
    logic [9:0] exp_led;
    SYSRST = 0;
    SLIDERS = 10'(n);
    repeat (3) @(posedge CLK);
    #3;
    check_display(32'h0, 10'h0, "held in reset");
    check(PC4, 32'h4, "PC held at 0");
    run_led = 0; run_seg = 0;
    counting = 1;
    @(negedge CLK) SYSRST = 1;
    @(posedge CLK); #1 check(PC4, 32'h4, "synchronizer edge 1");
    @(posedge CLK); #1 check(PC4, 32'h4, "synchronizer edge 2");
    n_sync++;
    sum = n * (n + 1) / 2;
    exp_led = (sum >= 32) ? 10'd1 : 10'd0;
    exp_cycles = (n == 0) ? 13 : 19 + 4 * n + ((sum >= 32) ? 1 : 0);
    edges = 0;
    while (PC4 != 32'h64 && edges < 10000) begin
      @(posedge CLK); #1;
      edges++;
      if (interrupt_at > 0 && edges == interrupt_at) begin
        #4 SYSRST = 0;
        #1;
        check_display(32'h0, 10'h0, "asynchronous reset clears outputs");
        check(PC4, 32'h4, "asynchronous reset clears PC");
        n_async++;
        counting = 0;
        return;
      end
    end
    check(edges, exp_cycles, "cycles to the final loop");
    repeat (4) @(posedge CLK);
    #1;
    check_display(sum, exp_led, "result");
    check(32'(run_seg), 32'd1, "SEG7 register written once");
    check(32'(run_led), 32'd1, "LED register written once");
    SLIDERS = ~SLIDERS;
    repeat (10) @(posedge CLK);
    #1 check_display(sum, exp_led, "result holds in the final loop");
    counting = 0;
  endtask

  initial begin
    SYSRST = 0; SLIDERS = 0;
    run(10, 0);     // board test: 0x37, LED on
    run(15, 0);     // board test: 0x78, LED on
    run(3, 0);      // board test: 6, LED off
    run(0, 0);
    run(7, 0);      // sum 28, just below 32
    run(8, 0);      // sum 36
    run(400, 37);   // reset pressed mid-loop
    run(1023, 0);
    repeat (4) run(int'($urandom % 1024), 0);

    checks++;
    if (n_br_taken == 0 || n_br_not == 0 || n_cond_fail == 0 || n_flags == 0 ||
        n_ldr_mem == 0 || n_ldr_sld == 0 || n_str_mem == 0 || n_str_led == 0 ||
        n_str_seg == 0 || n_sync == 0 || n_async == 0) failures++;
    $display("mechanisms: branch taken %0d, not taken %0d, condition failed %0d, flag writes %0d,",
             n_br_taken, n_br_not, n_cond_fail, n_flags);
    $display("  LDR memory %0d, LDR sliders %0d, STR memory %0d, STR LED %0d, STR SEG7 %0d,",
             n_ldr_mem, n_ldr_sld, n_str_mem, n_str_led, n_str_seg);
    $display("  synchronized releases %0d, asynchronous resets %0d", n_sync, n_async);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
