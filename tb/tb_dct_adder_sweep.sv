// tb_dct_adder_sweep: the DCT built with each of the five adder cells.
//
// Five dct_1d instances, one per cell kind (8 approximate low bits), and
// one more with approximation 4 in only 4 low bits, transform the same
// rows: an 8x8 synthetic image block (gradient with texture) and random
// rows. Every output of every instance is checked against the reference
// model; the conventional and approximation-1 instances must equal the
// exact integer dot product. The test prints, per instance, the mean and
// largest difference from the exact result in pixel units.
module tb_dct_adder_sweep;
  import cpl_pkg::*;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = 6;
  localparam cpl_kind_e KINDS [NI] = '{CPL_CONV, CPL_APPROX1, CPL_APPROX2, CPL_APPROX3, CPL_APPROX4, CPL_APPROX4};
  localparam int        LSBS  [NI] = '{8, 8, 8, 8, 8, 4};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, start;
  pix_t [N-1:0] x_in;
  logic [NI-1:0] busy, ov, done;
  idx_t         oi [NI];
  acc_t         o  [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dct
    dct_1d #(.KIND(KINDS[g]), .APPROX_LSBS(LSBS[g])) u (
      .clk, .rst_n, .start, .x_in, .busy(busy[g]), .out_valid(ov[g]),
      .out_index(oi[g]), .o1(o[g]), .done(done[g]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] row [8];
  real        sum_err [NI];
  real        max_err [NI];
  int         n_out;

  initial begin
    int exact, want;
    real e;
    rst_n = 1'b0; start = 1'b0; x_in = '0; n_out = 0;
    for (int i = 0; i < NI; i++) begin sum_err[i] = 0.0; max_err[i] = 0.0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 24; t++) begin
      for (int c = 0; c < 8; c++) begin
        row[c]  = (t < 8) ? 8'(16 + 24 * c + 6 * t + ((t * 7 + c * 13) % 11)) : 8'($urandom);
        x_in[c] = row[c];
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!ov[0]) @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        exact = 0;
        for (int n = 0; n < 8; n++) exact += int'(row[n]) * ref_coef(k, n);
        for (int i = 0; i < NI; i++) begin
          want = ref_dct(row, k, KINDS[i], LSBS[i], ACC_W);
          checks++;
          if (!ov[i] || oi[i] !== idx_t'(k) || int'(o[i]) != want) begin
            failures++;
            $display("instance %0d Y(%0d)=%0d expected %0d", i, k, int'(o[i]), want);
          end
          if (i <= 1) begin
            checks++;
            if (int'(o[i]) != exact) failures++;
          end
          e = real'(int'(o[i]) - exact) / 256.0;
          if (e < 0) e = -e;
          sum_err[i] += e;
          if (e > max_err[i]) max_err[i] = e;
        end
        n_out++;
        @(negedge clk);
      end
    end
    for (int i = 0; i < NI; i++)
      $display("cell %0d, %0d approximate bits: mean error %f, largest %f pixel units",
               int'(KINDS[i]), LSBS[i], sum_err[i] / n_out, max_err[i]);
    // fewer approximate bits must not be worse
    checks++;
    if (max_err[5] > max_err[4]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
