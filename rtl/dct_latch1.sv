// dct_latch1: LATCH 1 of the serial 1-D DCT.
//
// Holds the pixel picked by MUX 1 for the LUT stage. It is written here as an
// edge-triggered register with enable (a choice of this design; a
// level-sensitive latch would work the same in this schedule but complicates
// timing), so it forms the first pipeline stage. Reset clears it.
//
// Timing: q shows d one cycle after a clock with en high.
module dct_latch1
  import dct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t d,
  output pix_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
