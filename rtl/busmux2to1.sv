// busmux2to1: 32-bit two-input bus multiplexer, purely combinational.
// Y = D1 when S is high, Y = D0 when S is low. It is used twice: as the
// processor's write-back mux (REGSRC picks the ALU result on D1 or the memory
// data on D0) and as the system input data mux (DATAS picks main memory on D1
// or the slider register on D0).
module busmux2to1 (
  input  logic [31:0] D1,
  input  logic [31:0] D0,
  input  logic        S,
  output logic [31:0] Y
);
  always_comb Y = S ? D1 : D0;
endmodule
