// tb_addressdecoder: self-checking test of the address decoder against the
// decode table of the system: every mapped address, the edges of the main
// memory range, unmapped and random addresses, each with all four MEMRD/MEMWR
// combinations.
module tb_addressdecoder;
  logic [31:0] ADDR;
  logic MEMRD, MEMWR, LD2, LD1, LD0, DATAS;
  int checks = 0, failures = 0;

  addressdecoder dut (.ADDR(ADDR), .MEMRD(MEMRD), .MEMWR(MEMWR),
                      .LD2(LD2), .LD1(LD1), .LD0(LD0), .DATAS(DATAS));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [31:0] a);
    logic e2, e1, e0, es;
    for (int m = 0; m < 4; m++) begin
      ADDR = a; MEMRD = m[1]; MEMWR = m[0];
      #1;
      // table rows: STR to memory, LDR from memory, LDR from sliders,
      // STR to LED, STR to SEG7, RD and WR together not allowed
      e2 = (m == 1) && (a < 32);
      e1 = (m == 1) && (a == 32'hF8);
      e0 = (m == 1) && (a == 32'hFC);
      checks++;
      if ({LD2, LD1, LD0} !== {e2, e1, e0}) begin
        failures++;
        $display("FAIL addr=%h rd=%b wr=%b LD2..0=%b%b%b expected %b%b%b",
                 a, MEMRD, MEMWR, LD2, LD1, LD0, e2, e1, e0);
      end
      if (m == 2 && (a < 32 || a == 32'hF4)) begin
        es = (a < 32);
        checks++;
        if (DATAS !== es) begin
          failures++;
          $display("FAIL LDR addr=%h DATAS=%b expected %b", a, DATAS, es);
        end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) try(32'(a));
    try(32'hF4); try(32'hF8); try(32'hFC);
    try(32'h20); try(32'hF0); try(32'hF9); try(32'h1FC); try(32'h100000F8); try(32'hFFFFFFFF);
    for (int i = 0; i < 200; i++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
