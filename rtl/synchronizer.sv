// synchronizer: reset metastability synchronizer for the KEY0 pushbutton.
// Two flip-flops in series, both cleared asynchronously while SYSRST is low
// (the button gives logic 0 when pushed); the first samples a constant 1 and
// the second samples the first. RST therefore falls as soon as SYSRST falls and
// rises only on the second rising CLK edge after SYSRST is released, which gives
// a possibly metastable first stage a full clock period to settle. The
// two-stage structure, the constant-1 data input and the clear from SYSRST
// follow the design's synchronizer schematic.
module synchronizer (
  input  logic SYSRST,
  input  logic CLK,
  output logic RST
);
  logic meta;
  always_ff @(posedge CLK or negedge SYSRST) begin
    if (!SYSRST) begin
      meta <= 1'b0;
      RST  <= 1'b0;
    end else begin
      meta <= 1'b1;
      RST  <= meta;
    end
  end
endmodule
