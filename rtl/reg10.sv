// reg10: input slider device. A 10-bit register samples the slider switches D
// on each rising CLK edge while LD is high (the system ties LD high, so the
// switches are sampled every clock). RST low clears it asynchronously. The
// output Q is a 32-bit word with the ten stored bits in Q[9:0] and zeros in
// Q[31:10], as the design text asks. The reset value of zero is this design's
// choice.
module reg10 (
  input  logic [9:0]  D,
  input  logic        LD,
  input  logic        RST,
  input  logic        CLK,
  output logic [31:0] Q
);
  logic [9:0] q10;
  always_ff @(posedge CLK or negedge RST) begin
    if (!RST)    q10 <= '0;
    else if (LD) q10 <= D;
  end
  assign Q = {22'b0, q10};
endmodule
