// regfile: the sixteen 32-bit ARM registers R0..R15 of the single-cycle
// processor. Two combinational read ports (RA1->RD1, RA2->RD2) and one write
// port written on the rising CLK edge while WE3 is high (WA3, WD3). R15 is the
// program counter, which lives in the fetch stage: reading address 15 returns
// the R15 input (PC+8) and writes to it are ignored. RST low clears R0..R14
// asynchronously, as the design asks of the register file. Reset value and the
// R15 handling are this design's choices.
module regfile (
  input  logic        CLK,
  input  logic        RST,
  input  logic [3:0]  RA1,
  input  logic [3:0]  RA2,
  input  logic [3:0]  WA3,
  input  logic [31:0] WD3,
  input  logic        WE3,
  input  logic [31:0] R15,
  output logic [31:0] RD1,
  output logic [31:0] RD2
);
  logic [31:0] r [15];

  always_ff @(posedge CLK or negedge RST) begin
    if (!RST) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else if (WE3 && (WA3 != 4'd15)) begin
      r[WA3] <= WD3;
    end
  end

  assign RD1 = (RA1 == 4'd15) ? R15 : r[RA1];
  assign RD2 = (RA2 == 4'd15) ? R15 : r[RA2];
endmodule
