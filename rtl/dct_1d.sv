// dct_1d: serial 1-D 8-point DCT whose accumulator uses approximate CPL
// adders.
//
// Datapath, in order: REGISTER (dct_sample_reg) holds X(0)..X(7); MUX 1
// (dct_mux1) picks X(n); LATCH 1 (dct_latch1) holds it; the LUT stage
// (dct_lut) multiplies it by C(k,n) and accumulates with a CPL ripple adder;
// LATCH 2 (dct_latch2) stores each finished Y(k) at ADDRESS k; MUX 2
// (dct_mux2) streams Y(0)..Y(7) to the output O1. The CONTROLLER
// (dct_controller) drives every select, enable and address. The block chain
// follows the published architecture; the schedule, widths and coefficient
// scaling are this design's.
//
// KIND chooses the adder cell of the APPROX_LSBS low accumulator bits; the
// upper bits always use the exact cell.
//
// Interface: pulse start with the pixels on x_in (x_in[n] = X(n), unsigned);
// o1 is Y(out_index), signed with 8 fraction bits, while out_valid is high.
// Timing: out_valid in cycles 67..74 after the start cycle, done with the
// last output, 75 cycles per transform, one multiply-accumulate per clock.
module dct_1d
  import cpl_pkg::*;
  import dct_pkg::*;
#(
  parameter cpl_kind_e   KIND        = CPL_APPROX4,
  parameter int unsigned APPROX_LSBS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  pix_t [N-1:0] x_in,
  output logic         busy,
  output logic         out_valid,
  output idx_t         out_index,
  output acc_t         o1,
  output logic         done
);

  logic         load, l1_en, lut_valid, lut_first, l2_we;
  idx_t         sel1, sel2, lut_k, lut_n, address;
  pix_t [N-1:0] x_held;
  pix_t         x_sel, x_lat;
  acc_t         acc;
  acc_t [N-1:0] bank;

  dct_controller u_ctrl (
    .clk, .rst_n, .start,
    .load, .sel1, .l1_en,
    .lut_valid, .lut_first, .lut_k, .lut_n,
    .l2_we, .address, .sel2,
    .out_valid, .busy, .done
  );

  dct_sample_reg u_reg (.clk, .rst_n, .load, .x_in, .x_out(x_held));

  dct_mux1 u_mux1 (.sel(sel1), .x(x_held), .y(x_sel));

  dct_latch1 u_latch1 (.clk, .rst_n, .en(l1_en), .d(x_sel), .q(x_lat));

  dct_lut #(.KIND(KIND), .APPROX_LSBS(APPROX_LSBS)) u_lut (
    .clk, .rst_n,
    .valid(lut_valid), .first(lut_first), .k(lut_k), .n(lut_n),
    .x(x_lat), .acc
  );

  dct_latch2 u_latch2 (.clk, .rst_n, .we(l2_we), .addr(address), .d(acc), .q(bank));

  dct_mux2 u_mux2 (.sel(sel2), .d(bank), .y(o1));

  assign out_index = sel2;

endmodule
