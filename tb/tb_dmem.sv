// tb_dmem: self-checking test of the 32-word main memory. Random writes and
// reads are compared with a reference array; reads must be combinational,
// writes happen only with MEMWR high, and reset must clear every location.
module tb_dmem;
  logic [31:0] A, WD, RD;
  logic MEMWR, RST, CLK;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  dmem dut (.A(A), .WD(WD), .MEMWR(MEMWR), .RST(RST), .CLK(CLK), .RD(RD));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d: got %h expected %h", what, A, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    RST = 0; MEMWR = 0; A = 0; WD = 0;
    foreach (model[i]) model[i] = '0;
    #12 RST = 1;
    for (int i = 0; i < 32; i++) begin
      A = 32'(i); #1 check(RD, 32'h0, "after reset");
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge CLK);
      A = {27'b0, 5'($urandom)}; WD = $urandom; MEMWR = ($urandom % 2) == 1;
      #1 check(RD, model[A[4:0]], "read");
      @(posedge CLK);
      if (MEMWR) model[A[4:0]] = WD;
      #1 check(RD, model[A[4:0]], "read after edge");
    end
    #1 RST = 0;
    #1;
    for (int i = 0; i < 32; i++) begin
      A = 32'(i); #1 check(RD, 32'h0, "asynchronous reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
