// ce1921_pkg: types and constants shared by the CE1921 single-cycle computer.
// It holds the ALU operation codes carried on ALUS[2:0], the immediate-extension
// selects carried on EXTS[1:0], the ARM instruction-class codes on OP[1:0], the
// ARM condition codes and the memory map of the system (main memory 0x00-0x1F,
// sliders 0xF4, LEDs 0xF8, seven-segment display 0xFC). The memory map follows
// the published device table; the ALUS and EXTS encodings are this design's own.
package ce1921_pkg;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_ORR = 3'd3,
    ALU_EOR = 3'd4,
    ALU_MOV = 3'd5,   // pass operand B
    ALU_MVN = 3'd6,   // pass ~B
    ALU_RSB = 3'd7    // B - A
  } alu_op_e;

  typedef enum logic [1:0] {
    EXT_DPIMM  = 2'b00,  // imm8 rotated right by 2*ROTATE
    EXT_MEMOFF = 2'b01,  // imm12 zero-extended
    EXT_BRANCH = 2'b10   // imm24 sign-extended, times 4
  } exts_e;

  typedef enum logic [1:0] {
    OP_DP  = 2'b00,
    OP_MEM = 2'b01,
    OP_BR  = 2'b10
  } op_e;

  typedef enum logic [3:0] {
    CMD_AND = 4'h0, CMD_EOR = 4'h1, CMD_SUB = 4'h2, CMD_RSB = 4'h3,
    CMD_ADD = 4'h4, CMD_TST = 4'h8, CMD_TEQ = 4'h9, CMD_CMP = 4'hA,
    CMD_CMN = 4'hB, CMD_ORR = 4'hC, CMD_MOV = 4'hD, CMD_MVN = 4'hF
  } dp_cmd_e;

  typedef enum logic [3:0] {
    COND_EQ = 4'h0, COND_NE = 4'h1, COND_CS = 4'h2, COND_CC = 4'h3,
    COND_MI = 4'h4, COND_PL = 4'h5, COND_VS = 4'h6, COND_VC = 4'h7,
    COND_HI = 4'h8, COND_LS = 4'h9, COND_GE = 4'hA, COND_LT = 4'hB,
    COND_GT = 4'hC, COND_LE = 4'hD, COND_AL = 4'hE, COND_NV = 4'hF
  } cond_e;

  // Memory map
  localparam logic [31:0] MEM_LAST  = 32'h0000_001F;
  localparam logic [31:0] ADDR_SLD  = 32'h0000_00F4;
  localparam logic [31:0] ADDR_LED  = 32'h0000_00F8;
  localparam logic [31:0] ADDR_SEG7 = 32'h0000_00FC;

endpackage
