// tb_synchronizer: self-checking test of the reset synchronizer. SYSRST is
// pressed and released at random times between clock edges. RST must fall
// without waiting for a clock edge, stay low through the first rising edge
// after release and rise on the second one (a latency of two clocks).
module tb_synchronizer;
  logic SYSRST, CLK, RST;
  int checks = 0, failures = 0;

  synchronizer dut (.SYSRST(SYSRST), .CLK(CLK), .RST(RST));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  task automatic check(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: RST=%b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    SYSRST = 0;
    #3 check(RST, 1'b0, "held in reset");
    for (int i = 0; i < 50; i++) begin
      // release at a random point inside a clock low phase
      @(negedge CLK);
      #($urandom % 4 + 1) SYSRST = 1;
      @(posedge CLK); #1 check(RST, 1'b0, "first edge after release");
      @(posedge CLK); #1 check(RST, 1'b1, "second edge after release");
      repeat ($urandom % 5) begin
        @(posedge CLK); #1 check(RST, 1'b1, "running");
      end
      // press between edges: RST falls immediately
      #($urandom % 3 + 1) SYSRST = 0;
      #1 check(RST, 1'b0, "asynchronous assertion");
      repeat ($urandom % 3) begin
        @(posedge CLK); #1 check(RST, 1'b0, "pressed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
