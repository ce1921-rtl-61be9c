// controller: control unit of the single-cycle processor. It decodes the
// condition field COND (INSTR[31:28]), the class OP (INSTR[27:26]), FUNCT
// (INSTR[25:20]) and ROT (INSTR[11:8]) together with the stored flags into the
// control signals, all combinationally within the cycle:
//   PCSRC   1: next PC is BRADDR (taken branch)   PCWR    PC load enable
//   REGDST  1: second read address is Rd (STR)    REGWR   register write
//   EXTS    immediate format (ce1921_pkg::exts_e) ALUSRCB 1: ALU B is IMM32
//   ALUS    ALU operation (alu_op_e)              CPSRWR  flag write
//   MEMRD   1 while an LDR executes               MEMWR   1 while an STR executes
//   REGSRC  1: write back ALU result, 0: memory   ROTATE  imm8 rotate amount / 2
// Instructions whose condition fails change nothing but the PC (+4).
// Supported: data processing AND EOR SUB RSB ADD TST TEQ CMP CMN ORR MOV MVN
// with an 8-bit rotated immediate or a register operand (the shift field is
// not used), LDR/STR of a word with an immediate offset added or subtracted
// (no write-back), and B under any condition. Anything else executes as a
// no-op. The port list and the active-high MEMRD for LDR follow the design;
// the encodings and the instruction subset are this design's own.
module controller
  import ce1921_pkg::*;
(
  input  logic [3:0] COND,
  input  logic [1:0] OP,
  input  logic [5:0] FUNCT,
  input  logic [3:0] ROT,
  input  logic       C,
  input  logic       V,
  input  logic       N,
  input  logic       Z,
  output logic       PCSRC,
  output logic       PCWR,
  output logic       REGDST,
  output logic       REGWR,
  output logic [1:0] EXTS,
  output logic       ALUSRCB,
  output logic [2:0] ALUS,
  output logic       CPSRWR,
  output logic       MEMRD,
  output logic       MEMWR,
  output logic       REGSRC,
  output logic [3:0] ROTATE
);
  function automatic logic cond_pass(input logic [3:0] cc, input logic n, z, c, v);
    unique case (cond_e'(cc))
      COND_EQ: cond_pass = z;
      COND_NE: cond_pass = !z;
      COND_CS: cond_pass = c;
      COND_CC: cond_pass = !c;
      COND_MI: cond_pass = n;
      COND_PL: cond_pass = !n;
      COND_VS: cond_pass = v;
      COND_VC: cond_pass = !v;
      COND_HI: cond_pass = c && !z;
      COND_LS: cond_pass = !c || z;
      COND_GE: cond_pass = (n == v);
      COND_LT: cond_pass = (n != v);
      COND_GT: cond_pass = !z && (n == v);
      COND_LE: cond_pass = z || (n != v);
      COND_AL: cond_pass = 1'b1;
      default: cond_pass = 1'b0;   // NV: never
    endcase
  endfunction

  logic       pass;
  logic       dp_ok, mem_ok, br_ok;
  logic       dp_wr, dp_flags;
  logic [2:0] dp_alu;
  logic [3:0] cmd;

  always_comb begin
    pass     = cond_pass(COND, N, Z, C, V);
    cmd      = FUNCT[4:1];
    dp_ok    = 1'b1;
    dp_wr    = 1'b1;
    dp_flags = FUNCT[0];
    dp_alu   = ALU_ADD;
    unique case (cmd)
      CMD_AND: dp_alu = ALU_AND;
      CMD_EOR: dp_alu = ALU_EOR;
      CMD_SUB: dp_alu = ALU_SUB;
      CMD_RSB: dp_alu = ALU_RSB;
      CMD_ADD: dp_alu = ALU_ADD;
      CMD_ORR: dp_alu = ALU_ORR;
      CMD_MOV: dp_alu = ALU_MOV;
      CMD_MVN: dp_alu = ALU_MVN;
      CMD_TST: begin dp_alu = ALU_AND; dp_wr = 1'b0; dp_ok = FUNCT[0]; end
      CMD_TEQ: begin dp_alu = ALU_EOR; dp_wr = 1'b0; dp_ok = FUNCT[0]; end
      CMD_CMP: begin dp_alu = ALU_SUB; dp_wr = 1'b0; dp_ok = FUNCT[0]; end
      CMD_CMN: begin dp_alu = ALU_ADD; dp_wr = 1'b0; dp_ok = FUNCT[0]; end
      default: dp_ok = 1'b0;         // ADC, SBC, RSC, BIC not supported
    endcase
    // LDR/STR: immediate offset (FUNCT[5]=0), pre-indexed (P=1), word (B=0), no write-back (W=0)
    mem_ok = (FUNCT[5] == 1'b0) && FUNCT[4] && !FUNCT[2] && !FUNCT[1];
    // B: FUNCT[5]=1 (bit 25), L=0 (bit 24)
    br_ok  = (FUNCT[5:4] == 2'b10);

    PCSRC   = 1'b0;
    PCWR    = 1'b1;
    REGDST  = 1'b0;
    REGWR   = 1'b0;
    EXTS    = EXT_DPIMM;
    ALUSRCB = 1'b0;
    ALUS    = ALU_ADD;
    CPSRWR  = 1'b0;
    MEMRD   = 1'b0;
    MEMWR   = 1'b0;
    REGSRC  = 1'b1;
    ROTATE  = 4'd0;

    unique case (op_e'(OP))
      OP_DP: begin
        ALUSRCB = FUNCT[5];
        ROTATE  = FUNCT[5] ? ROT : 4'd0;
        ALUS    = dp_alu;
        REGWR   = pass && dp_ok && dp_wr;
        CPSRWR  = pass && dp_ok && dp_flags;
      end
      OP_MEM: begin
        EXTS    = EXT_MEMOFF;
        ALUSRCB = 1'b1;
        ALUS    = FUNCT[3] ? ALU_ADD : ALU_SUB;   // U bit
        REGDST  = 1'b1;
        REGSRC  = FUNCT[0] ? 1'b0 : 1'b1;         // LDR writes back memory data
        MEMRD   = pass && mem_ok && FUNCT[0];
        MEMWR   = pass && mem_ok && !FUNCT[0];
        REGWR   = pass && mem_ok && FUNCT[0];
      end
      OP_BR: begin
        EXTS    = EXT_BRANCH;
        ALUSRCB = 1'b1;
        PCSRC   = pass && br_ok;
      end
      default: ;
    endcase
  end
endmodule
