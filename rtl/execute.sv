// execute: execute stage of the single-cycle processor. Operand B is RD2 or
// IMM32 (ALUSRCB high), the ALU applies ALUS to RD1 and B and drives F, which
// is also the memory address. The current program status register holds the
// flags C, V, N, Z; it is written on the rising CLK edge while CPSRWR is high
// and cleared asynchronously while RST is low. The C, V, N, Z outputs are the
// stored flags, which the controller tests for conditional execution.
// ADD, SUB and RSB set all four flags (C is the carry out, i.e. "no borrow" for
// subtraction); AND, ORR, EOR, MOV and MVN set N and Z and keep C and V, as ARM
// does for an unshifted operand. Port names follow the design's execute stage;
// the ALU operation set and flag rules are this design's own ARM subset.
module execute
  import ce1921_pkg::*;
(
  input  logic [31:0] RD1,
  input  logic [31:0] RD2,
  input  logic [31:0] IMM32,
  input  logic        ALUSRCB,
  input  logic [2:0]  ALUS,
  input  logic        CPSRWR,
  input  logic        RST,
  input  logic        CLK,
  output logic [31:0] F,
  output logic        C,
  output logic        V,
  output logic        N,
  output logic        Z
);
  logic [31:0] b;
  logic [32:0] sum;
  logic        arith, c_new, v_new;

  always_comb begin
    b     = ALUSRCB ? IMM32 : RD2;
    sum   = '0;
    arith = 1'b0;
    c_new = C;
    v_new = V;
    unique case (alu_op_e'(ALUS))
      ALU_ADD: begin
        sum   = {1'b0, RD1} + {1'b0, b};
        arith = 1'b1;
        v_new = (RD1[31] == b[31]) && (sum[31] != RD1[31]);
      end
      ALU_SUB: begin
        sum   = {1'b0, RD1} + {1'b0, ~b} + 33'd1;
        arith = 1'b1;
        v_new = (RD1[31] != b[31]) && (sum[31] != RD1[31]);
      end
      ALU_RSB: begin
        sum   = {1'b0, b} + {1'b0, ~RD1} + 33'd1;
        arith = 1'b1;
        v_new = (RD1[31] != b[31]) && (sum[31] != b[31]);
      end
      ALU_AND: sum[31:0] = RD1 & b;
      ALU_ORR: sum[31:0] = RD1 | b;
      ALU_EOR: sum[31:0] = RD1 ^ b;
      ALU_MOV: sum[31:0] = b;
      ALU_MVN: sum[31:0] = ~b;
      default: sum       = '0;
    endcase
    if (arith) c_new = sum[32];
    F = sum[31:0];
  end

  always_ff @(posedge CLK or negedge RST) begin
    if (!RST) begin
      {N, Z, C, V} <= '0;
    end else if (CPSRWR) begin
      N <= F[31];
      Z <= (F == '0);
      C <= c_new;
      V <= v_new;
    end
  end
endmodule
