// tb_led: self-checking test of the LED output device. Random words are
// stored with random LD; LEDS must show bits 9..0 of the last stored word right
// after the clock edge, and clear at once on reset.
module tb_led;
  logic [31:0] D, model;
  logic LD, RST, CLK;
  logic [9:0] LEDS;
  int checks = 0, failures = 0;

  led dut (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .LEDS(LEDS));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  task automatic check(input logic [9:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    #12 check(LEDS, 10'h0, "reset");
    @(negedge CLK) RST = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge CLK);
      D = $urandom; LD = ($urandom % 2) == 1;
      @(posedge CLK);
      if (LD) model = D;
      #1 check(LEDS, model[9:0], LD ? "store" : "hold");
    end
    #2 RST = 0;
    #1 check(LEDS, 10'h0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
