// reg32: the data register used throughout the computer (PC-style register,
// LED and seven-segment data registers). Q loads D on a rising CLK edge while
// LD is high and holds otherwise; RST low clears Q to zero at once, without
// waiting for a clock edge. Asynchronous active-low reset, active-high load and
// the zero reset value follow the design text; WIDTH is a parameter so the
// same register can be reused, defaulting to 32.
module reg32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] D,
  input  logic             LD,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] Q
);
  always_ff @(posedge CLK or negedge RST) begin
    if (!RST)    Q <= '0;
    else if (LD) Q <= D;
  end
endmodule
