// fetch: fetch stage of the single-cycle processor. The PC is a reg32 with
// asynchronous active-low reset to address 0, loaded on every rising CLK edge
// while PCWR is high with either PC+4 (PCSRC low) or the branch target BRADDR
// (PCSRC high). BRADDR = PC + 8 + IMM32, where IMM32 is the already shifted
// branch offset, following the ARM rule that the PC reads eight bytes ahead.
// PC8 is the value an instruction sees when it reads R15. INSTR is the word
// the instruction ROM holds at PC, available in the same cycle. The output
// names PC4, INSTR and BRADDR follow the design; the structure is this
// design's own.
module fetch #(
  parameter string       IROM_FILE  = "rtl/de10rom1.hex",
  parameter int unsigned IROM_WORDS = 64
) (
  input  logic        CLK,
  input  logic        RST,
  input  logic        PCSRC,
  input  logic        PCWR,
  input  logic [31:0] IMM32,
  output logic [31:0] PC,
  output logic [31:0] PC4,
  output logic [31:0] PC8,
  output logic [31:0] BRADDR,
  output logic [31:0] INSTR
);
  logic [31:0] pc_next;

  assign PC4    = PC + 32'd4;
  assign PC8    = PC + 32'd8;
  assign BRADDR = PC8 + IMM32;

  busmux2to1 u_pcmux (.D1(BRADDR), .D0(PC4), .S(PCSRC), .Y(pc_next));
  reg32      u_pc    (.D(pc_next), .LD(PCWR), .RST(RST), .CLK(CLK), .Q(PC));
  irom #(.INIT_FILE(IROM_FILE), .WORDS(IROM_WORDS)) u_irom (.ADDR(PC), .DATA(INSTR));
endmodule
