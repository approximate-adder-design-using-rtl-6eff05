// dct_pkg: sizes, types and the coefficient formula of the serial 1-D DCT.
//
// The transform is the orthonormal 8-point DCT-II
//   Y(k) = a(k) * sum_{n=0..7} x(n) * cos((2n+1) k pi / 16),
//   a(0) = sqrt(1/8), a(k>0) = 1/2,
// on eight unsigned 8-bit pixels. Coefficients are held as signed integers
// scaled by 2^FRAC (FRAC = 8) and rounded to nearest:
//   C(k,n) = round(256 * a(k) * cos((2n+1) k pi / 16)).
// Because a(k>0) = 1/2, C(k>0,n) = +-COS128[m] with COS128[m] =
// round(128 cos(m pi / 16)), m = 0..8, and C(0,n) = round(256/sqrt(8)) = 91,
// which equals COS128[4]. coef() folds the angle (2n+1)k mod 32 into 0..8
// and applies the sign.
//
// Accumulator width: |Y| <= 8 * 255 * 128 = 261120 < 2^19, so 20 signed bits
// hold every sum; results carry FRAC fraction bits.
package dct_pkg;

  localparam int unsigned N      = 8;   // points per transform
  localparam int unsigned PIX_W  = 8;   // pixel width
  localparam int unsigned IDX_W  = 3;   // log2(N)
  localparam int unsigned FRAC   = 8;   // coefficient fraction bits
  localparam int unsigned COEF_W = 9;   // signed coefficient, |C| <= 128
  localparam int unsigned PROD_W = PIX_W + COEF_W;  // 17
  localparam int unsigned ACC_W  = 20;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // round(128 * cos(m * pi / 16)), m = 0..8
  localparam int COS128 [0:8] = '{128, 126, 118, 106, 91, 71, 49, 25, 0};

  function automatic coef_t coef(input idx_t k, input idx_t n);
    int m;
    int mag;
    bit neg;
    if (k == 0) return coef_t'(COS128[4]);
    m = ((2 * int'(n) + 1) * int'(k)) % 32;   // angle in units of pi/16
    if (m > 16) m = 32 - m;                   // cos(2pi - t) = cos(t)
    neg = 1'b0;
    if (m > 8) begin                          // cos(pi - t) = -cos(t)
      m   = 16 - m;
      neg = 1'b1;
    end
    mag = COS128[m];
    return neg ? coef_t'(-mag) : coef_t'(mag);
  endfunction

endpackage
