// tb_irom: self-checking test of the instruction ROM with its default image,
// the DE10ROM1 program. Known encodings of the program (MOV R4,#4 at 0x00,
// LDR R8,[R12] at 0x10, BNE loop at 0x2C, B done at 0x60) are checked, the
// words after the program and past the end of the ROM must read zero.
module tb_irom;
  logic [31:0] ADDR, DATA;
  int checks = 0, failures = 0;

  irom dut (.ADDR(ADDR), .DATA(DATA));

  task automatic check(input logic [31:0] a, exp);
    ADDR = a;
    #1;
    checks++;
    if (DATA !== exp) begin
      failures++;
      $display("FAIL addr=%h: got %h expected %h", a, DATA, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    check(32'h00, 32'hE3A0_4004);   // MOV R4,#4
    check(32'h08, 32'hE584_C000);   // STR R12,[R4]
    check(32'h0C, 32'hE3A0_C0F4);   // MOV R12,#0xF4
    check(32'h10, 32'hE59C_8000);   // LDR R8,[R12]
    check(32'h1C, 32'h0A00_000A);   // BEQ print
    check(32'h20, 32'hE089_9008);   // ADD R9,R9,R8
    check(32'h2C, 32'h1AFF_FFFB);   // BNE loop
    check(32'h34, 32'hE24A_A020);   // SUB R10,R10,#32
    check(32'h4C, 32'hE3A0_C0FC);   // MOV R12,#0xFC
    check(32'h60, 32'hEAFF_FFFE);   // B done
    for (int w = 25; w < 64; w++) check(32'(4 * w), 32'h0);
    check(32'h100, 32'h0);
    check(32'h8000_0000, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
