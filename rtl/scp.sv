// scp: the CE1921 single-cycle processor, an ARMv4-subset core that completes
// one instruction per rising CLK edge. Stages, all within one cycle:
//   fetch      PC, instruction ROM, PC+4 and branch-target adders
//   decode     controller, register file, immediate extender
//   execute    ALU and the program status register (flags C, V, N, Z)
//   write-back busmux2to1 choosing the ALU result (REGSRC=1) or MEMDATAIN.
// The data memory is not inside the processor: the ALU result leaves as
// MEMADDR, the second register operand (Rd for STR) as MEMDATAOUT, and load
// data comes back on MEMDATAIN, combinationally within the same cycle. MEMRD is
// high while an LDR executes and MEMWR while an STR executes; the system's
// address decoder turns them into device strobes. Every control signal, the
// flags, PC4, INSTR, BRADDR and the write-back value WD3 are outputs for
// simulation and board debugging. RST is an asynchronous active-low reset of
// the PC (to 0), the register file and the flags. The bus structure and the
// output list follow the design; the internal datapath is this design's own.
module scp #(
  parameter string       IROM_FILE  = "rtl/de10rom1.hex",
  parameter int unsigned IROM_WORDS = 64
) (
  input  logic [31:0] MEMDATAIN,
  input  logic        RST,
  input  logic        CLK,
  output logic [31:0] MEMADDR,
  output logic [31:0] MEMDATAOUT,
  output logic [31:0] WD3,
  output logic        PCSRC,
  output logic        PCWR,
  output logic        REGDST,
  output logic        REGWR,
  output logic [1:0]  EXTS,
  output logic        ALUSRCB,
  output logic [2:0]  ALUS,
  output logic        CPSRWR,
  output logic        MEMRD,
  output logic        MEMWR,
  output logic        REGSRC,
  output logic [3:0]  ROTATE,
  output logic        C,
  output logic        V,
  output logic        N,
  output logic        Z,
  output logic [31:0] PC4,
  output logic [31:0] INSTR,
  output logic [31:0] BRADDR
);
  logic [31:0] pc, pc8, imm32, rd1, rd2, f;
  logic [3:0]  ra2;

  fetch #(.IROM_FILE(IROM_FILE), .IROM_WORDS(IROM_WORDS)) u_fetch (
    .CLK(CLK), .RST(RST), .PCSRC(PCSRC), .PCWR(PCWR), .IMM32(imm32),
    .PC(pc), .PC4(PC4), .PC8(pc8), .BRADDR(BRADDR), .INSTR(INSTR));

  controller u_ctrl (
    .COND(INSTR[31:28]), .OP(INSTR[27:26]), .FUNCT(INSTR[25:20]), .ROT(INSTR[11:8]),
    .C(C), .V(V), .N(N), .Z(Z),
    .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMRD(MEMRD), .MEMWR(MEMWR),
    .REGSRC(REGSRC), .ROTATE(ROTATE));

  assign ra2 = REGDST ? INSTR[15:12] : INSTR[3:0];

  regfile u_rf (
    .CLK(CLK), .RST(RST), .RA1(INSTR[19:16]), .RA2(ra2), .WA3(INSTR[15:12]),
    .WD3(WD3), .WE3(REGWR), .R15(pc8), .RD1(rd1), .RD2(rd2));

  extend u_ext (.INSTR24(INSTR[23:0]), .EXTS(EXTS), .ROTATE(ROTATE), .IMM32(imm32));

  execute u_exe (
    .RD1(rd1), .RD2(rd2), .IMM32(imm32), .ALUSRCB(ALUSRCB), .ALUS(ALUS),
    .CPSRWR(CPSRWR), .RST(RST), .CLK(CLK), .F(f), .C(C), .V(V), .N(N), .Z(Z));

  busmux2to1 u_wbmux (.D1(f), .D0(MEMDATAIN), .S(REGSRC), .Y(WD3));

  assign MEMADDR    = f;
  assign MEMDATAOUT = rd2;

  // An access is either a load or a store, never both.
  always_comb assert (!(MEMRD && MEMWR)) else $error("scp: MEMRD and MEMWR both high");
endmodule
