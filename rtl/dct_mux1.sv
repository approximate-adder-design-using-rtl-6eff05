// dct_mux1: sample selector (MUX 1) of the serial 1-D DCT.
//
// An 8:1 multiplexer: the controller's SEL 1 picks pixel X(sel) out of the
// input register and passes it to LATCH 1. Purely combinational.
module dct_mux1
  import dct_pkg::*;
(
  input  idx_t         sel,
  input  pix_t [N-1:0] x,
  output pix_t         y
);

  always_comb y = x[sel];

endmodule
