// tb_extend: self-checking test of the immediate generator. For random
// instruction fields it checks the rotated 8-bit immediate (rotation computed
// bit by bit), the zero-extended 12-bit offset and the sign-extended,
// word-scaled branch offset.
module tb_extend;
  import ce1921_pkg::*;
  logic [23:0] INSTR24;
  logic [1:0]  EXTS;
  logic [3:0]  ROTATE;
  logic [31:0] IMM32, exp;
  int checks = 0, failures = 0;

  extend dut (.INSTR24(INSTR24), .EXTS(EXTS), .ROTATE(ROTATE), .IMM32(IMM32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 900; i++) begin
      INSTR24 = 24'($urandom); ROTATE = 4'($urandom); EXTS = 2'(i % 3);
      #1;
      case (EXTS)
        2'b00: begin
          exp = {24'b0, INSTR24[7:0]};
          for (int r = 0; r < 2 * ROTATE; r++) exp = {exp[0], exp[31:1]};
        end
        2'b01: exp = 32'(INSTR24[11:0]);
        default: exp = 32'($signed(INSTR24)) * 4;
      endcase
      checks++;
      if (IMM32 !== exp) begin
        failures++;
        $display("FAIL EXTS=%0d ROT=%0d instr=%h: got %h expected %h", EXTS, ROTATE, INSTR24, IMM32, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
