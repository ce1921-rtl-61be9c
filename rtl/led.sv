// led: LED output device, memory mapped at 0x000000F8. A reg32 data register
// (asynchronous active-low RST, active-high LD) holds the last word stored to
// the device; only its low ten bits reach the ten board LEDs (LEDS = Q[9:0]),
// Q[31:10] are kept but unused, as in the design's LED schematic. LEDS change
// right after the rising CLK edge on which LD is high.
module led (
  input  logic [31:0] D,
  input  logic        LD,
  input  logic        RST,
  input  logic        CLK,
  output logic [9:0]  LEDS
);
  logic [31:0] q;
  reg32 u_reg (.D(D), .LD(LD), .RST(RST), .CLK(CLK), .Q(q));
  assign LEDS = q[9:0];
endmodule
