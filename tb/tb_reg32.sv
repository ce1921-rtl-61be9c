// tb_reg32: self-checking test of reg32. Random D and LD over 400 clock
// cycles are compared with a reference register kept in the testbench; an
// asynchronous reset is applied between clock edges and must clear Q at once.
module tb_reg32;
  logic [31:0] D, Q, model;
  logic LD, RST, CLK;
  int checks = 0, failures = 0;

  reg32 dut (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .Q(Q));

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
    RST = 0; D = '0; LD = 0; model = '0;
    #12 check(Q, 32'h0, "reset value");
    RST = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge CLK);
      D  = $urandom;
      LD = ($urandom % 3) != 0;
      @(posedge CLK);
      if (LD) model = D;
      #1 check(Q, model, "after edge");
      if (i == 200) begin
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
