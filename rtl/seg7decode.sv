// seg7decode: turns the low six hex nibbles of A into six seven-segment buses.
// SEGk shows nibble k (A[4k+3:4k]). Each bus is active low for the common-anode
// displays of the board: bit i lights segment i (0 top, 1 upper right,
// 2 lower right, 3 bottom, 4 lower left, 5 upper left, 6 middle) and bit 7 is
// the decimal point, kept dark. The glyph for 0 (8'b1100_0000) and 1
// (8'b1111_1001) are those of the design text; the remaining hex glyphs are the
// usual ones with lower-case b and d. The design text says both that the low
// five nibbles are displayed and that six buses are produced with SEG5 fed from
// A[23:20]; this module follows the six-bus form. Purely combinational.
module seg7decode (
  input  logic [31:0] A,
  output logic [7:0]  SEG0,
  output logic [7:0]  SEG1,
  output logic [7:0]  SEG2,
  output logic [7:0]  SEG3,
  output logic [7:0]  SEG4,
  output logic [7:0]  SEG5
);
  function automatic logic [7:0] glyph(input logic [3:0] nib);
    case (nib)
      4'h0: glyph = 8'b1100_0000;
      4'h1: glyph = 8'b1111_1001;
      4'h2: glyph = 8'b1010_0100;
      4'h3: glyph = 8'b1011_0000;
      4'h4: glyph = 8'b1001_1001;
      4'h5: glyph = 8'b1001_0010;
      4'h6: glyph = 8'b1000_0010;
      4'h7: glyph = 8'b1111_1000;
      4'h8: glyph = 8'b1000_0000;
      4'h9: glyph = 8'b1001_0000;
      4'hA: glyph = 8'b1000_1000;
      4'hB: glyph = 8'b1000_0011;
      4'hC: glyph = 8'b1100_0110;
      4'hD: glyph = 8'b1010_0001;
      4'hE: glyph = 8'b1000_0110;
      default: glyph = 8'b1000_1110;
    endcase
  endfunction

  always_comb begin
    SEG0 = glyph(A[3:0]);
    SEG1 = glyph(A[7:4]);
    SEG2 = glyph(A[11:8]);
    SEG3 = glyph(A[15:12]);
    SEG4 = glyph(A[19:16]);
    SEG5 = glyph(A[23:20]);
  end
endmodule
