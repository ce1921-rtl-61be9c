// tb_reg10: self-checking test of the slider register. Random switch values
// and load enables are compared with a reference register; the upper 22 bits
// of Q must read zero and an asynchronous reset must clear Q between edges.
module tb_reg10;
  logic [9:0]  D, model;
  logic [31:0] Q;
  logic LD, RST, CLK;
  int checks = 0, failures = 0;

  reg10 dut (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .Q(Q));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    RST = 0; D = '1; LD = 1; model = '0;
    #12 check(Q, 32'h0, "reset value");
    @(negedge CLK) RST = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge CLK);
      D  = 10'($urandom);
      LD = ($urandom % 4) != 0;
      @(posedge CLK);
      if (LD) model = D;
      #1 check(Q, {22'b0, model}, "after edge");
      if (i == 150) begin
        #2 RST = 0;
        #1 check(Q, 32'h0, "asynchronous reset");
        model = '0;
        @(negedge CLK) RST = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
