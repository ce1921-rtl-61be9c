// tb_seg7: self-checking test of the SEG7 output device. Words are stored with
// LD high and must appear on SEG0..SEG5 right after the clock edge; with LD low
// the display must hold; reset must show 000000 at once. The expected glyphs
// are built from the lit-segment list of each hex digit.
module tb_seg7;
  logic [31:0] D, model;
  logic LD, RST, CLK;
  logic [7:0] SEG [6];
  int checks = 0, failures = 0;

  seg7 dut (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .SEG0(SEG[0]), .SEG1(SEG[1]),
            .SEG2(SEG[2]), .SEG3(SEG[3]), .SEG4(SEG[4]), .SEG5(SEG[5]));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  function automatic logic [7:0] expect_seg(input logic [3:0] d);
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

  task automatic check_all(input string what);
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (SEG[k] !== expect_seg(model[4*k +: 4])) begin
        failures++;
        $display("FAIL %s: SEG%0d=%b expected %b (value %h)", what, k, SEG[k],
                 expect_seg(model[4*k +: 4]), model);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RST = 0; LD = 0; D = '0; model = '0;
    #12 check_all("reset");
    @(negedge CLK) RST = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge CLK);
      D = $urandom; LD = i[0] | i[2];
      @(posedge CLK);
      if (LD) model = D;
      #1 check_all(LD ? "store" : "hold");
    end
    #2 RST = 0;
    model = '0;
    #1 check_all("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
