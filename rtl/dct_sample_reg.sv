// dct_sample_reg: input register of the serial 1-D DCT.
//
// Holds the eight 8-bit pixels X(0)..X(7) of one transform while the
// datapath reads them one at a time through MUX 1. The whole row is captured
// in one clock when load is high; otherwise the register holds. Reset clears
// it to zero (a choice of this design).
//
// Interface: x_in[n] is pixel X(n); x_out[n] the held copy.
// Timing: x_out shows the new row one cycle after load.
module dct_sample_reg
  import dct_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  pix_t [N-1:0]   x_in,
  output pix_t [N-1:0]   x_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x_out <= '0;
    else if (load) x_out <= x_in;
  end

endmodule
