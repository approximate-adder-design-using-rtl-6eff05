// cpl_dct_top: approximate CPL adders and the 1-D DCT that uses them.
//
// Two parts stand side by side:
//   - the five 1-bit CPL adder cells (conventional, approximations 1-4), all
//     driven by the same test inputs cell_a, cell_b, cell_cin; bit i of
//     cell_sum / cell_cout is the output of cell kind i (cpl_kind_e order),
//     so the cells' truth tables can be compared directly;
//   - the serial 1-D DCT (dct_1d) whose accumulator low bits use the cell
//     chosen by KIND (approximation 4, the smallest cell, by default).
//
// Interface and timing of the DCT part are those of dct_1d: pulse start with
// the pixels on x_in; Y(0)..Y(7) appear on o1 in cycles 67..74 after it. The
// cell part is combinational.
module cpl_dct_top
  import cpl_pkg::*;
  import dct_pkg::*;
#(
  parameter cpl_kind_e   KIND        = CPL_APPROX4,
  parameter int unsigned APPROX_LSBS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // adder cells
  input  logic                 cell_a,
  input  logic                 cell_b,
  input  logic                 cell_cin,
  output logic [NUM_KINDS-1:0] cell_sum,
  output logic [NUM_KINDS-1:0] cell_cout,
  // DCT
  input  logic                 start,
  input  pix_t [N-1:0]         x_in,
  output logic                 busy,
  output logic                 out_valid,
  output idx_t                 out_index,
  output acc_t                 o1,
  output logic                 done
);

  cpl_adder_conv    u_conv (.a(cell_a), .b(cell_b), .cin(cell_cin), .sum(cell_sum[CPL_CONV]),    .cout(cell_cout[CPL_CONV]));
  cpl_adder_approx1 u_ax1  (.a(cell_a), .b(cell_b), .cin(cell_cin), .sum(cell_sum[CPL_APPROX1]), .cout(cell_cout[CPL_APPROX1]));
  cpl_adder_approx2 u_ax2  (.a(cell_a), .b(cell_b), .cin(cell_cin), .sum(cell_sum[CPL_APPROX2]), .cout(cell_cout[CPL_APPROX2]));
  cpl_adder_approx3 u_ax3  (.a(cell_a), .b(cell_b), .cin(cell_cin), .sum(cell_sum[CPL_APPROX3]), .cout(cell_cout[CPL_APPROX3]));
  cpl_adder_approx4 u_ax4  (.a(cell_a), .b(cell_b), .cin(cell_cin), .sum(cell_sum[CPL_APPROX4]), .cout(cell_cout[CPL_APPROX4]));

  dct_1d #(.KIND(KIND), .APPROX_LSBS(APPROX_LSBS)) u_dct (
    .clk, .rst_n, .start, .x_in,
    .busy, .out_valid, .out_index, .o1, .done
  );

endmodule
