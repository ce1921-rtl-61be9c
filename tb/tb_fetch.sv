// tb_fetch: self-checking test of the fetch stage with the default DE10ROM1
// image. PCSRC, PCWR and the branch offset are driven at random; a reference
// PC kept in the testbench predicts PC, PC+4, PC+8, the branch target and the
// instruction word, read from its own copy of the ROM image. Reset returns the
// PC to 0 at once.
module tb_fetch;
  logic CLK, RST, PCSRC, PCWR;
  logic [31:0] IMM32, PC, PC4, PC8, BRADDR, INSTR, pc_m;
  logic [31:0] image [64];
  int checks = 0, failures = 0;

  fetch dut (.CLK(CLK), .RST(RST), .PCSRC(PCSRC), .PCWR(PCWR), .IMM32(IMM32),
             .PC(PC), .PC4(PC4), .PC8(PC8), .BRADDR(BRADDR), .INSTR(INSTR));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (pc %h)", what, got, exp, pc_m);
    end
  endtask

  task automatic check_all();
    check(PC, pc_m, "PC");
    check(PC4, pc_m + 4, "PC4");
    check(PC8, pc_m + 8, "PC8");
    check(BRADDR, pc_m + 8 + IMM32, "BRADDR");
    check(INSTR, (pc_m < 256) ? image[pc_m[7:2]] : 32'h0, "INSTR");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (image[i]) image[i] = '0;
    $readmemh("rtl/de10rom1.hex", image);
    RST = 0; PCSRC = 0; PCWR = 1; IMM32 = 0; pc_m = 0;
    #12 check_all();
    @(negedge CLK) RST = 1;
    for (int i = 0; i < 500; i++) begin
      PCSRC = ($urandom % 4) == 0;
      PCWR  = ($urandom % 8) != 0;
      // branch offsets that keep the PC mostly inside the ROM
      IMM32 = 32'($signed(int'($urandom % 24) - 12)) * 4;
      #1 check_all();
      @(posedge CLK);
      if (PCWR) pc_m = PCSRC ? pc_m + 8 + IMM32 : pc_m + 4;
      if (pc_m > 32'h200) begin
        #1 check_all();
        @(negedge CLK) RST = 0;   // bring the PC back
        pc_m = 0;
        #1 check_all();
        @(posedge CLK);
        #1 check_all();
        RST = 1;
      end else begin
        #1 check_all();
      end
      @(negedge CLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
