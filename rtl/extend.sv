// extend: immediate generator of the decode stage. From the low 24 bits of the
// instruction it forms IMM32 according to EXTS:
//   EXT_DPIMM  - data-processing immediate: INSTR[7:0] rotated right by
//                2*ROTATE (ROTATE is INSTR[11:8], passed on by the controller)
//   EXT_MEMOFF - LDR/STR offset: INSTR[11:0] zero-extended
//   EXT_BRANCH - branch offset: INSTR[23:0] sign-extended and multiplied by 4.
// Purely combinational. The immediate formats are those of the ARM
// architecture; the select encoding is this design's own.
module extend
  import ce1921_pkg::*;
(
  input  logic [23:0] INSTR24,
  input  logic [1:0]  EXTS,
  input  logic [3:0]  ROTATE,
  output logic [31:0] IMM32
);
  logic [31:0] imm8;
  logic [4:0]  rot;
  always_comb begin
    imm8 = {24'b0, INSTR24[7:0]};
    rot  = {ROTATE, 1'b0};
    unique case (exts_e'(EXTS))
      EXT_DPIMM:  IMM32 = (imm8 >> rot) | (imm8 << (6'd32 - {1'b0, rot}));
      EXT_MEMOFF: IMM32 = {20'b0, INSTR24[11:0]};
      EXT_BRANCH: IMM32 = {{6{INSTR24[23]}}, INSTR24, 2'b00};
      default:    IMM32 = '0;
    endcase
  end
endmodule
