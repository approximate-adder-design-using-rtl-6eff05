// tb_dct_1d: end-to-end test of the serial 1-D DCT.
//
// Two DCTs run on the same pixel rows: the default one (approximation 4 in
// the 8 low accumulator bits) and one built with the exact conventional
// cell. Each transform is started, the eight outputs are collected from O1
// and compared with the reference: coefficients from real arithmetic, sums
// through the truth-table adder model. The exact DCT must also equal the
// integer dot product and stay within rounding of the real-valued DCT.
// The latency (first output 67 cycles after start, eight consecutive outputs
// in index order) is checked for every transform.
module tb_dct_1d;
  import cpl_pkg::*;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, start;
  pix_t [N-1:0] x_in;
  logic         busy_a, ov_a, done_a, busy_e, ov_e, done_e;
  idx_t         oi_a, oi_e;
  acc_t         o_a, o_e;

  dct_1d                    dut   (.clk, .rst_n, .start, .x_in, .busy(busy_a), .out_valid(ov_a),
                                   .out_index(oi_a), .o1(o_a), .done(done_a));
  dct_1d #(.KIND(CPL_CONV)) dut_e (.clk, .rst_n, .start, .x_in, .busy(busy_e), .out_valid(ov_e),
                                   .out_index(oi_e), .o1(o_e), .done(done_e));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] row [8];

  initial begin
    int cyc, got, exact;
    real err, maxerr;
    maxerr = 0.0;
    rst_n = 1'b0; start = 1'b0; x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 8; i++) begin
        row[i]  = (t == 0) ? 8'hFF : (t == 1) ? 8'(i * 32) : 8'($urandom);
        x_in[i] = row[i];
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      x_in  = '0;   // the register must have captured the row
      cyc = 1;
      while (!ov_a && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 67) begin
        failures++;
        $display("transform %0d: first output after %0d cycles, expected 67", t, cyc);
      end
      for (int k = 0; k < 8; k++) begin
        checks += 5;
        if (!ov_a || !ov_e || oi_a !== idx_t'(k)) begin
          failures++;
          $display("output %0d not valid or out of order", k);
        end
        got = int'(o_a);
        if (got != ref_dct(row, k, CPL_APPROX4, 8, ACC_W)) begin
          failures++;
          $display("t=%0d Y(%0d) approx=%0d expected %0d", t, k, got, ref_dct(row, k, CPL_APPROX4, 8, ACC_W));
        end
        exact = 0;
        for (int n = 0; n < 8; n++) exact += int'(row[n]) * ref_coef(k, n);
        if (int'(o_e) != exact) begin
          failures++;
          $display("t=%0d Y(%0d) exact=%0d expected %0d", t, k, int'(o_e), exact);
        end
        // coefficient rounding: at most 0.5 * sum(x) / 256 pixel units
        err = (real'(int'(o_e)) - real_dct(row, k)) / 256.0;
        if (err < 0) err = -err;
        if (err > 0.5 * 8.0 * 255.0 / 256.0) failures++;
        if (done_a !== (k == 7)) failures++;
        err = (real'(int'(o_a)) - real'(int'(o_e))) / 256.0;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        @(negedge clk);
      end
      checks++;
      if (ov_a || busy_a) failures++;   // back to idle after eight outputs
    end
    $display("largest approximate-vs-exact difference: %f pixel units", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
