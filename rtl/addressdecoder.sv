// addressdecoder: memory-map decoder of the system. From the processor address
// ADDR and the MEMRD (LDR) and MEMWR (STR) strobes it produces
//   LD2   - write strobe of main memory, STR to 0x00..0x1F
//   LD1   - load of the LED register,   STR to 0xF8
//   LD0   - load of the SEG7 register,  STR to 0xFC
//   DATAS - system input mux select, 1 = main memory, 0 = sliders.
// A cycle with MEMRD and MEMWR both high is an invalid access and asserts no
// load. DATAS is only meaningful during LDR; this decoder drives it high for an
// LDR inside the main-memory range and low otherwise, so an LDR from 0xF4 (or
// from any unmapped address) returns the sliders. Purely combinational. The
// decode table follows the design text; the value of DATAS outside a memory LDR
// is this design's choice.
module addressdecoder
  import ce1921_pkg::*;
(
  input  logic [31:0] ADDR,
  input  logic        MEMRD,
  input  logic        MEMWR,
  output logic        LD2,
  output logic        LD1,
  output logic        LD0,
  output logic        DATAS
);
  logic in_mem, store, load;
  always_comb begin
    in_mem = (ADDR <= MEM_LAST);
    store  = MEMWR && !MEMRD;
    load   = MEMRD && !MEMWR;
    LD2    = store && in_mem;
    LD1    = store && (ADDR == ADDR_LED);
    LD0    = store && (ADDR == ADDR_SEG7);
    DATAS  = load && in_mem;
  end

  // At most one device register or memory is written per cycle.
  always_comb assert (!(LD2 && LD1) && !(LD2 && LD0) && !(LD1 && LD0))
    else $error("addressdecoder: more than one load strobe");
endmodule
