// seg7: seven-segment output device, memory mapped at 0x000000FC. A reg32 data
// register (asynchronous active-low RST, active-high LD) holds the last word
// stored to the device, and a seg7decode shows its low six nibbles on
// SEG0..SEG5. The segment buses change right after the rising CLK edge on which
// LD is high. Structure as drawn in the design's SEG7 schematic.
module seg7 (
  input  logic [31:0] D,
  input  logic        LD,
  input  logic        RST,
  input  logic        CLK,
  output logic [7:0]  SEG0,
  output logic [7:0]  SEG1,
  output logic [7:0]  SEG2,
  output logic [7:0]  SEG3,
  output logic [7:0]  SEG4,
  output logic [7:0]  SEG5
);
  logic [31:0] q;
  reg32 u_reg (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .Q(q));
  seg7decode u_dec (.A(q), .SEG0(SEG0), .SEG1(SEG1), .SEG2(SEG2),
                    .SEG3(SEG3), .SEG4(SEG4), .SEG5(SEG5));
endmodule
