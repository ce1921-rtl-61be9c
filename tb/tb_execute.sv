// tb_execute: self-checking test of the execute stage. Random operands (with
// extra weight on the sign and carry boundary values), operand-B selects and
// ALU operations are compared with a reference written with 64-bit integer
// arithmetic: C from the unsigned result, V from the signed result leaving the
// 32-bit range. The flag register must update only with CPSRWR high, logical
// operations must keep C and V, and reset must clear the flags.
module tb_execute;
  import ce1921_pkg::*;
  logic [31:0] RD1, RD2, IMM32, F;
  logic ALUSRCB, CPSRWR, RST, CLK, C, V, N, Z;
  logic [2:0] ALUS;
  logic [31:0] b, ef;
  logic en, ez, ec, ev, mn, mz, mc, mv;
  int checks = 0, failures = 0;

  execute dut (.RD1(RD1), .RD2(RD2), .IMM32(IMM32), .ALUSRCB(ALUSRCB), .ALUS(ALUS),
               .CPSRWR(CPSRWR), .RST(RST), .CLK(CLK), .F(F), .C(C), .V(V), .N(N), .Z(Z));

  initial CLK = 0;
  always #5 CLK = ~CLK;

  function automatic logic [31:0] pick();
    case ($urandom % 6)
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'h7FFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h: got %h expected %h", what, ALUS, RD1, b, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb, sr;
    longint unsigned ua, ub;
    RST = 0; CPSRWR = 0; RD1 = 0; RD2 = 0; IMM32 = 0; ALUSRCB = 0; ALUS = 0;
    {mn, mz, mc, mv} = '0;
    #12 check({28'b0, N, Z, C, V}, 32'h0, "reset flags");
    @(negedge CLK) RST = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge CLK);
      RD1 = pick(); RD2 = pick(); IMM32 = pick();
      ALUSRCB = 1'($urandom); ALUS = 3'($urandom); CPSRWR = ($urandom % 4) != 0;
      #1;
      b  = ALUSRCB ? IMM32 : RD2;
      ua = 64'(RD1); ub = 64'(b);
      sa = longint'($signed(RD1)); sb = longint'($signed(b));
      ec = mc; ev = mv;
      case (ALUS)
        3'd0: begin ef = RD1 + b; ec = (ua + ub) > 64'hFFFF_FFFF; sr = sa + sb; ev = sr > 64'sd2147483647 || sr < -64'sd2147483648; end
        3'd1: begin ef = RD1 - b; ec = ua >= ub; sr = sa - sb; ev = sr > 64'sd2147483647 || sr < -64'sd2147483648; end
        3'd7: begin ef = b - RD1; ec = ub >= ua; sr = sb - sa; ev = sr > 64'sd2147483647 || sr < -64'sd2147483648; end
        3'd2: ef = RD1 & b;
        3'd3: ef = RD1 | b;
        3'd4: ef = RD1 ^ b;
        3'd5: ef = b;
        default: ef = ~b;
      endcase
      en = ef[31]; ez = (ef == 0);
      check(F, ef, "F");
      @(posedge CLK);
      if (CPSRWR) {mn, mz, mc, mv} = {en, ez, ec, ev};
      #1 check({28'b0, N, Z, C, V}, {28'b0, mn, mz, mc, mv}, "flags NZCV");
    end
    #1 RST = 0;
    #1 check({28'b0, N, Z, C, V}, 32'h0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
