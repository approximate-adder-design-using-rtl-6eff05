// dct_lut: coefficient table and multiply-accumulate stage of the 1-D DCT.
//
// The table holds the 64 DCT-II coefficients C(k,n) of dct_pkg (scaled by
// 2^FRAC, signed). Each valid cycle the stage multiplies the pixel from
// LATCH 1 by C(k,n) and adds the product to the running sum of output k:
//   acc <= (first ? 0 : acc) + x * C(k,n)
// The addition goes through cpl_rca, a ripple chain of CPL adder cells whose
// APPROX_LSBS low bits use the approximate cell KIND; this is where an
// approximate adder changes the transform result. The product itself is an
// exact two's-complement multiplication.
//
// That the table holds coefficients and the stage multiplies and accumulates
// is this design's reading of "the LUT carries out the computation"; the
// coefficient scaling, widths and the exact multiplier are its own choices.
//
// Interface: valid, first (first term of a sum), k, n, x -> acc (ACC_W
// signed bits, FRAC fraction bits).
// Timing: acc is updated at the clock edge that ends a valid cycle; after
// the eighth term (n = 7) acc holds Y(k) for one cycle at least.
module dct_lut
  import cpl_pkg::*;
  import dct_pkg::*;
#(
  parameter cpl_kind_e   KIND        = CPL_APPROX4,
  parameter int unsigned APPROX_LSBS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic first,
  input  idx_t k,
  input  idx_t n,
  input  pix_t x,
  output acc_t acc
);

  // coefficient table, index {k, n}
  coef_t rom [N*N];
  always_comb begin
    for (int i = 0; i < int'(N * N); i++) rom[i] = coef(idx_t'(i / int'(N)), idx_t'(i % int'(N)));
  end

  coef_t                    c;
  logic signed [PROD_W-1:0] prod;
  acc_t                     addend_a, addend_b, sum;
  logic                     unused_cout;

  always_comb begin
    c        = rom[{k, n}];
    prod     = $signed({1'b0, x}) * c;
    addend_a = first ? '0 : acc;
    addend_b = acc_t'(prod);   // sign-extend
  end

  cpl_rca #(
    .WIDTH      (ACC_W),
    .KIND       (KIND),
    .APPROX_LSBS(APPROX_LSBS)
  ) u_add (
    .a   (addend_a),
    .b   (addend_b),
    .cin (1'b0),
    .sum (sum),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (valid) acc <= sum;
  end

endmodule
