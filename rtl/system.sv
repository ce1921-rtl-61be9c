// system: the CE1921 DE10-Lite computer. A single-cycle ARM processor (scp)
// sees main memory and three memory-mapped devices through its memory buses:
//   0x00..0x1F  dmem, 32 words of main memory   (STR: LD2, LDR: DATAS=1)
//   0xF4        reg10 slider register, read-only (LDR: DATAS=0)
//   0xF8        led output device                (STR: LD1)
//   0xFC        seg7 output device               (STR: LD0)
// The addressdecoder derives the strobes from MEMADDR, MEMRD and MEMWR, and
// the system input data mux (busmux2to1, select DATAS) returns either the
// memory word or the slider word to the processor on MEMDATAIN, all within the
// cycle of the load. The slider register samples SLIDERS on every clock. The
// pushbutton reset SYSRST (active low) passes through the two-stage
// synchronizer: every register is cleared asynchronously while SYSRST is low
// and leaves reset on the second rising CLK edge after release. All processor
// debug outputs and the decoder strobes are brought out as ports.
// The block structure and connections follow the design's system schematic.
module system #(
  parameter string       IROM_FILE  = "rtl/de10rom1.hex",
  parameter int unsigned IROM_WORDS = 64,
  parameter int unsigned MEM_WORDS  = 32
) (
  input  logic        CLK,
  input  logic        SYSRST,
  input  logic [9:0]  SLIDERS,
  output logic [9:0]  LEDS,
  output logic [7:0]  SEG0,
  output logic [7:0]  SEG1,
  output logic [7:0]  SEG2,
  output logic [7:0]  SEG3,
  output logic [7:0]  SEG4,
  output logic [7:0]  SEG5,
  output logic [31:0] WD3,
  output logic        PCSRC,
  output logic        PCWR,
  output logic        REGDST,
  output logic        REGWR,
  output logic [1:0]  EXTS,
  output logic        ALUSRCB,
  output logic [2:0]  ALUS,
  output logic        CPSRWR,
  output logic        MEMRD,
  output logic        MEMWR,
  output logic        REGSRC,
  output logic [3:0]  ROTATE,
  output logic        C,
  output logic        V,
  output logic        N,
  output logic        Z,
  output logic [31:0] PC4,
  output logic [31:0] INSTR,
  output logic [31:0] BRADDR,
  output logic        LD2,
  output logic        LD1,
  output logic        LD0,
  output logic        DATAS
);
  logic        rst;
  logic [31:0] memaddr, memdataout, memdatain, rd_mem, q_sld;

  synchronizer u_sync (.SYSRST(SYSRST), .CLK(CLK), .RST(rst));

  reg10 u_sliders (.D(SLIDERS), .LD(1'b1), .RST(rst), .CLK(CLK), .Q(q_sld));

  busmux2to1 u_inmux (.D1(rd_mem), .D0(q_sld), .S(DATAS), .Y(memdatain));

  scp #(.IROM_FILE(IROM_FILE), .IROM_WORDS(IROM_WORDS)) u_scp (
    .MEMDATAIN(memdatain), .RST(rst), .CLK(CLK),
    .MEMADDR(memaddr), .MEMDATAOUT(memdataout), .WD3(WD3),
    .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMRD(MEMRD), .MEMWR(MEMWR),
    .REGSRC(REGSRC), .ROTATE(ROTATE), .C(C), .V(V), .N(N), .Z(Z),
    .PC4(PC4), .INSTR(INSTR), .BRADDR(BRADDR));

  addressdecoder u_dec (.ADDR(memaddr), .MEMRD(MEMRD), .MEMWR(MEMWR),
                        .LD2(LD2), .LD1(LD1), .LD0(LD0), .DATAS(DATAS));

  dmem #(.WORDS(MEM_WORDS)) u_dmem (.A(memaddr), .WD(memdataout), .MEMWR(LD2),
                                    .RST(rst), .CLK(CLK), .RD(rd_mem));

  led  u_led  (.D(memdataout), .LD(LD1), .RST(rst), .CLK(CLK), .LEDS(LEDS));

  seg7 u_seg7 (.D(memdataout), .LD(LD0), .RST(rst), .CLK(CLK),
               .SEG0(SEG0), .SEG1(SEG1), .SEG2(SEG2), .SEG3(SEG3), .SEG4(SEG4), .SEG5(SEG5));
endmodule
