// tb_controller: self-checking test of the controller. Random instruction
// fields (weighted toward the supported data-processing, load/store and branch
// encodings) and random flags are applied; the expected control word is worked
// out by a reference decoder in the testbench, whose condition test uses the
// ARM pairing of condition codes (bits 3..1 choose the test, bit 0 inverts it).
module tb_controller;
  import ce1921_pkg::*;
  logic [3:0] COND, ROT, ROTATE;
  logic [1:0] OP, EXTS;
  logic [5:0] FUNCT;
  logic C, V, N, Z;
  logic PCSRC, PCWR, REGDST, REGWR, ALUSRCB, CPSRWR, MEMRD, MEMWR, REGSRC;
  logic [2:0] ALUS;
  int checks = 0, failures = 0;
  int n_dp = 0, n_ldr = 0, n_str = 0, n_br = 0, n_fail = 0;

  controller dut (.COND(COND), .OP(OP), .FUNCT(FUNCT), .ROT(ROT), .C(C), .V(V), .N(N), .Z(Z),
                  .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
                  .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMRD(MEMRD),
                  .MEMWR(MEMWR), .REGSRC(REGSRC), .ROTATE(ROTATE));

  function automatic logic passes(input logic [3:0] cc, input logic n, z, c, v);
    logic t;
    case (cc[3:1])
      3'd0: t = z;
      3'd1: t = c;
      3'd2: t = n;
      3'd3: t = v;
      3'd4: t = c & ~z;
      3'd5: t = ~(n ^ v);
      3'd6: t = ~z & ~(n ^ v);
      default: t = 1'b1;
    endcase
    return t ^ cc[0];
  endfunction

  typedef struct packed {
    logic pcsrc, pcwr, regdst, regwr;
    logic [1:0] exts;
    logic alusrcb;
    logic [2:0] alus;
    logic cpsrwr, memrd, memwr, regsrc;
    logic [3:0] rotate;
  } ctl_t;

  function automatic ctl_t reference(input logic [3:0] cc, input logic [1:0] op,
                                     input logic [5:0] fn, input logic [3:0] rot,
                                     input logic n, z, c, v);
    ctl_t e;
    logic p, wr, ok;
    logic [2:0] alu;
    p = passes(cc, n, z, c, v);
    e = '0;
    e.pcwr = 1'b1;
    e.regsrc = 1'b1;
    if (op == 2'b00) begin
      ok = 1'b1; wr = 1'b1;
      case (fn[4:1])
        4'h0: alu = 3'd2;
        4'h1: alu = 3'd4;
        4'h2: alu = 3'd1;
        4'h3: alu = 3'd7;
        4'h4: alu = 3'd0;
        4'hC: alu = 3'd3;
        4'hD: alu = 3'd5;
        4'hF: alu = 3'd6;
        4'h8: begin alu = 3'd2; wr = 0; ok = fn[0]; end
        4'h9: begin alu = 3'd4; wr = 0; ok = fn[0]; end
        4'hA: begin alu = 3'd1; wr = 0; ok = fn[0]; end
        4'hB: begin alu = 3'd0; wr = 0; ok = fn[0]; end
        default: begin alu = 3'd0; ok = 0; end
      endcase
      e.alusrcb = fn[5];
      e.rotate  = fn[5] ? rot : 4'd0;
      e.alus    = alu;
      e.regwr   = p & ok & wr;
      e.cpsrwr  = p & ok & fn[0];
    end else if (op == 2'b01) begin
      ok = (fn[5:4] == 2'b01) && (fn[2:1] == 2'b00);
      e.exts    = 2'b01;
      e.alusrcb = 1'b1;
      e.alus    = fn[3] ? 3'd0 : 3'd1;
      e.regdst  = 1'b1;
      e.regsrc  = ~fn[0];
      e.memrd   = p & ok & fn[0];
      e.memwr   = p & ok & ~fn[0];
      e.regwr   = p & ok & fn[0];
    end else if (op == 2'b10) begin
      e.exts    = 2'b10;
      e.alusrcb = 1'b1;
      e.pcsrc   = p & (fn[5:4] == 2'b10);
    end
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl_t got, exp;
    for (int i = 0; i < 5000; i++) begin
      COND = ($urandom % 3 == 0) ? 4'hE : 4'($urandom);
      OP = 2'($urandom); FUNCT = 6'($urandom); ROT = 4'($urandom);
      if (OP == 2'b01 && $urandom % 2) begin FUNCT[5:4] = 2'b01; FUNCT[2:1] = 2'b00; end
      if (OP == 2'b10 && $urandom % 2) FUNCT[5:4] = 2'b10;
      {N, Z, C, V} = 4'($urandom);
      #1;
      got = {PCSRC, PCWR, REGDST, REGWR, EXTS, ALUSRCB, ALUS, CPSRWR, MEMRD, MEMWR, REGSRC, ROTATE};
      exp = reference(COND, OP, FUNCT, ROT, N, Z, C, V);
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL cond=%h op=%b funct=%b nzcv=%b%b%b%b: got %b expected %b",
                 COND, OP, FUNCT, N, Z, C, V, got, exp);
      end
      if (REGWR && OP == 2'b00) n_dp++;
      if (MEMRD) n_ldr++;
      if (MEMWR) n_str++;
      if (PCSRC) n_br++;
      if (!passes(COND, N, Z, C, V)) n_fail++;
    end
    checks++;
    if (n_dp == 0 || n_ldr == 0 || n_str == 0 || n_br == 0 || n_fail == 0) begin
      failures++;
      $display("FAIL coverage dp=%0d ldr=%0d str=%0d br=%0d condfail=%0d", n_dp, n_ldr, n_str, n_br, n_fail);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
