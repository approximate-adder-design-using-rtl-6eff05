// cpl_rca: multi-bit ripple-carry adder built from 1-bit CPL cells.
//
// Bit i is one CPL full-adder cell; its carry out feeds bit i+1. The
// APPROX_LSBS least significant bits use the approximate cell named by KIND,
// the remaining upper bits the exact conventional cell, so that the errors of
// an approximate cell stay in the low-order part of the word and at most one
// wrong carry reaches the exact upper part. With KIND = CPL_CONV (or
// CPL_APPROX1) the adder is exact for any APPROX_LSBS.
//
// Two's-complement operands add correctly through the chain, so the same
// adder serves signed sums. The ripple structure and the split into an
// approximate low part and an exact high part are this design's choice; the
// cells themselves follow the published truth tables.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Purely combinational; delay grows linearly with WIDTH.
module cpl_rca
  import cpl_pkg::*;
#(
  parameter int unsigned WIDTH       = 20,
  parameter cpl_kind_e   KIND        = CPL_APPROX4,
  parameter int unsigned APPROX_LSBS = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;
  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    if (i >= int'(APPROX_LSBS) || KIND == CPL_CONV) begin : g_exact
      cpl_adder_conv u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else if (KIND == CPL_APPROX1) begin : g_ax1
      cpl_adder_approx1 u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else if (KIND == CPL_APPROX2) begin : g_ax2
      cpl_adder_approx2 u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else if (KIND == CPL_APPROX3) begin : g_ax3
      cpl_adder_approx3 u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else begin : g_ax4
      cpl_adder_approx4 u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end
  end

endmodule
