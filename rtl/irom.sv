// irom: instruction ROM of the single-cycle processor. WORDS 32-bit words,
// filled at start-up from the hex file INIT_FILE (one word per line, word 0
// first); words the file does not supply read as zero. ADDR is the byte
// address from the PC: the word ADDR[.. :2] is returned combinationally in the
// same cycle. An address beyond the ROM reads zero (ANDEQ R0,R0,R0, which this
// processor executes as a no-op). The default image is the DE10ROM1 test
// program of the design (sum 1..n of the slider value). The ROM size of 64
// words is this design's choice.
module irom #(
  parameter string       INIT_FILE = "rtl/de10rom1.hex",
  parameter int unsigned WORDS     = 64
) (
  input  logic [31:0] ADDR,
  output logic [31:0] DATA
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;
  logic [31:0] rom [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) rom[i] = '0;
    $readmemh(INIT_FILE, rom);
  end

  logic [29:0] word;
  assign word = ADDR[31:2];
  always_comb begin
    if (word < 30'(WORDS)) DATA = rom[word[AW-1:0]];
    else                   DATA = '0;
  end
endmodule
