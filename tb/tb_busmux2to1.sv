// tb_busmux2to1: self-checking test of the 32-bit two-input mux with random
// data on both inputs and both select values.
module tb_busmux2to1;
  logic [31:0] D1, D0, Y;
  logic S;
  int checks = 0, failures = 0;

  busmux2to1 dut (.D1(D1), .D0(D0), .S(S), .Y(Y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      D1 = $urandom; D0 = $urandom; S = i[0];
      #1;
      checks++;
      if (Y !== (i[0] ? D1 : D0)) begin
        failures++;
        $display("FAIL S=%b D1=%h D0=%h Y=%h", S, D1, D0, Y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
