// dmem: main memory of the system, WORDS (default 32) locations of 32 bits at
// addresses 0x00..0x1F. Each address names one 32-bit location (location =
// A[4:0] for the default size), as the design text's MEM[4] at address 4
// implies. Reads are combinational (RD follows A in the same cycle, as a
// single-cycle processor needs); a write of WD takes place on the rising CLK
// edge while MEMWR (the decoder's LD2) is high. RST low clears every location
// asynchronously, as the design text asks of all registers and the memory.
module dmem #(
  parameter int unsigned WORDS = 32
) (
  input  logic [31:0] A,
  input  logic [31:0] WD,
  input  logic        MEMWR,
  input  logic        RST,
  input  logic        CLK,
  output logic [31:0] RD
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;
  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = A[AW-1:0];
  assign RD  = mem[idx];

  always_ff @(posedge CLK or negedge RST) begin
    if (!RST) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (MEMWR) begin
      mem[idx] <= WD;
    end
  end
endmodule
