// dct_mux2: output selector (MUX 2) of the serial 1-D DCT.
//
// An 8:1 multiplexer over the LATCH 2 bank: SEL 2 from the controller picks
// coefficient Y(sel) for the serial output O1. Purely combinational.
module dct_mux2
  import dct_pkg::*;
(
  input  idx_t         sel,
  input  acc_t [N-1:0] d,
  output acc_t         y
);

  always_comb y = d[sel];

endmodule
