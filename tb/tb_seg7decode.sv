// tb_seg7decode: self-checking test of the seven-segment decoder. The expected
// bus for each hex digit is built from the list of lit segments of the digit
// (segments 0 top .. 6 middle), active low with the decimal point (bit 7) dark.
// Every digit is tried in every one of the six positions, then random words.
module tb_seg7decode;
  logic [31:0] A;
  logic [7:0]  SEG [6];
  int checks = 0, failures = 0;

  seg7decode dut (.A(A), .SEG0(SEG[0]), .SEG1(SEG[1]), .SEG2(SEG[2]),
                  .SEG3(SEG[3]), .SEG4(SEG[4]), .SEG5(SEG[5]));

  // Lit segments of each glyph
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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (SEG[k] !== expect_seg(A[4*k +: 4])) begin
        failures++;
        $display("FAIL A=%h SEG%0d=%b expected %b", A, k, SEG[k], expect_seg(A[4*k +: 4]));
      end
    end
  endtask

  initial begin
    if (expect_seg(4'h0) != 8'b1100_0000 || expect_seg(4'h1) != 8'b1111_1001) failures++;
    for (int d = 0; d < 16; d++)
      for (int k = 0; k < 6; k++) begin
        A = $urandom;
        A[4*k +: 4] = 4'(d);
        #1 check_all();
      end
    for (int i = 0; i < 200; i++) begin
      A = $urandom;
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
