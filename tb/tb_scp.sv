// tb_scp: self-checking test of the single-cycle processor on its own. The
// processor runs the test program tb/scp_test.hex, which exercises every
// supported data-processing operation with immediate and register operands,
// flag setting, conditional execution under all condition codes, loads and
// stores with positive and negative offsets, R15 reads, a counted loop and
// taken and not-taken branches of every kind. The testbench holds a 32-word
// memory on the processor's memory buses and runs an instruction-level
// reference model of the ARM subset in lock step: every cycle it checks the
// fetched instruction, PC+4, the register write (REGWR, WD3), the memory
// strobes, address and store data and, after the edge, the flags. This also
// checks the rate of one instruction per clock. At the end, memory words
// computed by hand from the program must be present.
//
// The test program, as held in tb/scp_test.hex (address, word, source):
//   000 E3A014FF         MOV R1,#0xFF000000
//   004 E3E02000         MVN R2,#0
//   008 E2923001         ADDS R3,R2,#1
//   00C E3A0447F         MOV R4,#0x7F000000
//   010 E0945004         ADDS R5,R4,R4
//   014 E0516004         SUBS R6,R1,R4
//   018 E2647E3F         RSB R7,R4,#0x3F0
//   01C E0218002         EOR R8,R1,R2
//   020 E3849081         ORR R9,R4,#0x81
//   024 E002A009         AND R10,R2,R9
//   028 E3B0B000         MOVS R11,#0
//   02C E1F0C004         MVNS R12,R4
//   030 E3140102         TST R4,#0x80000000
//   034 E1320002         TEQ R2,R2
//   038 E3720001         CMN R2,#1
//   03C E1540001         CMP R4,R1
//   040 C2800001         ADDGT R0,R0,#1
//   044 D2800002         ADDLE R0,R0,#2
//   048 82800004         ADDHI R0,R0,#4
//   04C 92800008         ADDLS R0,R0,#8
//   050 42800010         ADDMI R0,R0,#16
//   054 62800020         ADDVS R0,R0,#32
//   058 72800040         ADDVC R0,R0,#64
//   05C 22800080         ADDCS R0,R0,#128
//   060 32800C01         ADDCC R0,R0,#256
//   064 E3A0D008         MOV R13,#8
//   068 E58D9004         STR R9,[R13,#4]
//   06C E58D4000         STR R4,[R13]
//   070 E50D0008         STR R0,[R13,#-8]
//   074 E59D1004         LDR R1,[R13,#4]
//   078 E51D2008         LDR R2,[R13,#-8]
//   07C E28F3000         ADD R3,R15,#0
//   080 E3A05005         MOV R5,#5
//   084 E3A06000         MOV R6,#0
//   088 E0866005  loop:  ADD R6,R6,R5
//   08C E2555001         SUBS R5,R5,#1
//   090 1AFFFFFC         BNE loop
//   094 E356000F         CMP R6,#15
//   098 0A000000         BEQ t1
//   09C E3A07EBA         MOV R7,#0xBA0
//   0A0 E3560010  t1:    CMP R6,#16
//   0A4 AA000000         BGE bad
//   0A8 BA000000         BLT t2
//   0AC E3A080EE  bad:   MOV R8,#0xEE
//   0B0 E356000F  t2:    CMP R6,#15
//   0B4 CAFFFFFC         BGT bad
//   0B8 DA000000         BLE t3
//   0BC EAFFFFFA         B bad
//   0C0 E356000E  t3:    CMP R6,#14
//   0C4 9AFFFFF8         BLS bad
//   0C8 8A000000         BHI t4
//   0CC EAFFFFF6         B bad
//   0D0 E3560010  t4:    CMP R6,#0x10
//   0D4 5AFFFFF4         BPL bad
//   0D8 4A000000         BMI t5
//   0DC EAFFFFF2         B bad
//   0E0 E356000F  t5:    CMP R6,#15
//   0E4 1AFFFFF0         BNE bad
//   0E8 3AFFFFEF         BCC bad
//   0EC 6AFFFFEE         BVS bad
//   0F0 7A000000         BVC t6
//   0F4 EAFFFFEC         B bad
//   0F8 E58D600C  t6:    STR R6,[R13,#12]
//   0FC E59DA00C         LDR R10,[R13,#12]
//   100 E08AB006         ADD R11,R10,R6
//   104 E58DB010         STR R11,[R13,#16]
//   108 EAFFFFFE  done:  B done
module tb_scp;
  logic CLK, RST;
  logic [31:0] MEMDATAIN, MEMADDR, MEMDATAOUT, WD3, PC4, INSTR, BRADDR;
  logic PCSRC, PCWR, REGDST, REGWR, ALUSRCB, CPSRWR, MEMRD, MEMWR, REGSRC, C, V, N, Z;
  logic [1:0] EXTS;
  logic [2:0] ALUS;
  logic [3:0] ROTATE;

  logic [31:0] image [128];
  logic [31:0] mem [32];
  int checks = 0, failures = 0;

  scp #(.IROM_FILE("tb/scp_test.hex"), .IROM_WORDS(128)) dut (
    .MEMDATAIN(MEMDATAIN), .RST(RST), .CLK(CLK), .MEMADDR(MEMADDR), .MEMDATAOUT(MEMDATAOUT),
    .WD3(WD3), .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMRD(MEMRD), .MEMWR(MEMWR),
    .REGSRC(REGSRC), .ROTATE(ROTATE), .C(C), .V(V), .N(N), .Z(Z), .PC4(PC4),
    .INSTR(INSTR), .BRADDR(BRADDR));

  assign MEMDATAIN = mem[MEMADDR[4:0]];
  always @(posedge CLK) if (MEMWR) mem[MEMADDR[4:0]] <= MEMDATAOUT;

  initial CLK = 0;
  always #5 CLK = ~CLK;

  // ---------------- reference model ----------------
  logic [31:0] r [15];
  logic [31:0] pc;
  logic mn, mz, mc, mv;

  function automatic logic cond_ok(input logic [3:0] cc);
    logic t;
    case (cc[3:1])
      3'd0: t = mz;           3'd1: t = mc;
      3'd2: t = mn;           3'd3: t = mv;
      3'd4: t = mc && !mz;    3'd5: t = (mn == mv);
      3'd6: t = !mz && (mn == mv);
      default: t = 1'b1;
    endcase
    return t ^ cc[0];
  endfunction

  function automatic logic [31:0] rd(input logic [3:0] a);
    return (a == 15) ? pc + 8 : r[a];
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL pc=%h %s: got %h expected %h", pc, what, got, exp);
    end
  endtask

  // One instruction: compares the DUT outputs of this cycle and updates the model.
  task automatic step();
    logic [31:0] ins, a, b, res, nxt;
    logic [3:0] cmd, rdst;
    logic wr_reg, wr_mem, rd_mem, flags, logical;
    longint sa, sb, sr;
    longint unsigned ua, ub;
    logic nc, nv;
    ins = (pc < 512) ? image[pc[8:2]] : 32'h0;
    check(INSTR, ins, "INSTR");
    check(PC4, pc + 4, "PC4");
    wr_reg = 0; wr_mem = 0; rd_mem = 0; flags = 0; res = 0; nxt = pc + 4;
    rdst = ins[15:12];
    nc = mc; nv = mv;
    if (cond_ok(ins[31:28])) begin
      if (ins[27:26] == 2'b00) begin
        a = rd(ins[19:16]);
        if (ins[25]) begin
          b = {24'b0, ins[7:0]};
          b = (b >> (2 * ins[11:8])) | (b << (32 - 2 * ins[11:8]));
        end else b = rd(ins[3:0]);
        cmd = ins[24:21];
        ua = 64'(a); ub = 64'(b);
        sa = longint'($signed(a)); sb = longint'($signed(b));
        logical = 1;
        case (cmd)
          4'h0, 4'h8: res = a & b;
          4'h1, 4'h9: res = a ^ b;
          4'hC: res = a | b;
          4'hD: res = b;
          4'hF: res = ~b;
          4'h2, 4'hA: begin logical = 0; res = a - b; nc = ua >= ub; sr = sa - sb; end
          4'h3: begin logical = 0; res = b - a; nc = ub >= ua; sr = sb - sa; end
          4'h4, 4'hB: begin logical = 0; res = a + b; nc = (ua + ub) >> 32 != 0; sr = sa + sb; end
          default: ;
        endcase
        if (!logical) nv = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
        wr_reg = !(cmd inside {4'h8, 4'h9, 4'hA, 4'hB});
        flags = ins[20];
      end else if (ins[27:26] == 2'b01) begin
        a = rd(ins[19:16]) + (ins[23] ? 32'(ins[11:0]) : -32'(ins[11:0]));
        if (ins[20]) begin
          rd_mem = 1; wr_reg = 1;
          check(MEMADDR, a, "load address");
          res = mem[a[4:0]];
        end else begin
          wr_mem = 1;
          check(MEMADDR, a, "store address");
          check(MEMDATAOUT, rd(rdst), "store data");
        end
      end else if (ins[27:25] == 3'b101) begin
        nxt = pc + 8 + (32'($signed(ins[23:0])) << 2);
        check(BRADDR, nxt, "BRADDR");
      end
    end
    check({31'b0, MEMWR}, {31'b0, wr_mem}, "MEMWR");
    check({31'b0, MEMRD}, {31'b0, rd_mem}, "MEMRD");
    check({31'b0, REGWR}, {31'b0, wr_reg}, "REGWR");
    check({31'b0, PCSRC}, {31'b0, nxt != pc + 4}, "PCSRC");
    if (wr_reg) check(WD3, res, "WD3");
    // advance the model at the clock edge
    @(posedge CLK);
    if (wr_reg && rdst != 15) r[rdst] = res;
    if (flags) begin mn = res[31]; mz = (res == 0); mc = nc; mv = nv; end
    pc = nxt;
    #1 check({28'b0, N, Z, C, V}, {28'b0, mn, mz, mc, mv}, "flags NZCV");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    foreach (image[i]) image[i] = '0;
    $readmemh("tb/scp_test.hex", image);
    foreach (mem[i]) mem[i] = '0;
    foreach (r[i]) r[i] = '0;
    pc = 0; {mn, mz, mc, mv} = '0;
    RST = 0;
    #12;
    @(negedge CLK) RST = 1;
    steps = 0;
    // run until the final "B done" loops on itself three times
    while (steps < 400) begin
      step();
      @(negedge CLK);
      steps++;
      if (pc == 32'(66 * 4) && steps > 70) break;
    end
    repeat (3) begin step(); @(negedge CLK); end
    // values worked out by hand from the program
    check(mem[0],  32'd313,        "CMP R4,R1 condition sum stored at 0");
    check(mem[8],  32'h7F00_0000,  "R4 stored at 8");
    check(mem[12], 32'h7F00_0081,  "ORR result stored at 12");
    check(mem[20], 32'd15,         "loop sum stored at 20");
    check(mem[24], 32'd30,         "reloaded sum doubled stored at 24");
    check(r[3],    32'd132,        "R15 read as PC+8");
    check(r[7],    32'h8100_03F0,  "RSB result kept (BEQ t1 taken)");
    check(r[8],    32'h00FF_FFFF,  "EOR result kept (no branch reached bad)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
