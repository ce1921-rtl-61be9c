// tb_regfile: self-checking test of the register file. Random writes with
// random enables and random reads on both ports are compared with a reference
// array; R15 must read the R15 input and ignore writes; reset clears R0..R14.
module tb_regfile;
  logic CLK, RST, WE3;
  logic [3:0] RA1, RA2, WA3;
  logic [31:0] WD3, R15, RD1, RD2;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  regfile dut (.CLK(CLK), .RST(RST), .RA1(RA1), .RA2(RA2), .WA3(WA3), .WD3(WD3),
               .WE3(WE3), .R15(R15), .RD1(RD1), .RD2(RD2));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read_both();
    #1;
    check(RD1, (RA1 == 15) ? R15 : model[RA1], "RD1");
    check(RD2, (RA2 == 15) ? R15 : model[RA2], "RD2");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RST = 0; WE3 = 0; WA3 = 0; WD3 = 0; R15 = 32'h8; RA1 = 0; RA2 = 0;
    foreach (model[i]) model[i] = '0;
    #12 RST = 1;
    for (int r = 0; r < 16; r++) begin RA1 = 4'(r); RA2 = 4'(15 - r); read_both(); end
    for (int i = 0; i < 800; i++) begin
      @(negedge CLK);
      WA3 = 4'($urandom); WD3 = $urandom; WE3 = ($urandom % 3) != 0; R15 = $urandom;
      RA1 = 4'($urandom); RA2 = 4'($urandom);
      read_both();
      @(posedge CLK);
      if (WE3 && WA3 != 15) model[WA3] = WD3;
      read_both();
    end
    #1 RST = 0;
    foreach (model[i]) model[i] = '0;
    for (int r = 0; r < 16; r++) begin RA1 = 4'(r); RA2 = 4'(r); read_both(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
