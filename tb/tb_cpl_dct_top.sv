// tb_cpl_dct_top: end-to-end test of the whole design at its default
// parameters (approximation 4 in the 8 low accumulator bits).
//
// Part 1 drives the five adder cells through all eight input rows and
// compares each with its published truth table; it counts, per cell, the
// rows where it departs from the exact full adder (none for the
// conventional cell and approximation 1, 2/2/4 for approximations 2/3/4).
//
// Part 2 transforms the eight rows of a synthetic 8x8 image block (a
// gradient with texture) and a set of random and extreme rows. Every output
// is compared with the reference model (real-valued coefficients, truth-table
// adder) and the latency of 67 cycles is checked. The test counts how often
// each mechanism occurred and fails if one never did: a transform, a start
// accepted right after the previous one finished, a start ignored while
// busy, an output changed by the approximate adder, and a negative
// coefficient. It reports the mean and largest difference between the
// approximate outputs and the exact dot products, in pixel units.
module tb_cpl_dct_top;
  import cpl_pkg::*;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 rst_n, start;
  logic                 cell_a, cell_b, cell_cin;
  logic [NUM_KINDS-1:0] cell_sum, cell_cout;
  pix_t [N-1:0]         x_in;
  logic                 busy, out_valid, done;
  idx_t                 out_index;
  acc_t                 o1;

  cpl_dct_top dut (.clk, .rst_n, .cell_a, .cell_b, .cell_cin, .cell_sum, .cell_cout,
                   .start, .x_in, .busy, .out_valid, .out_index, .o1, .done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_transforms = 0, n_back_to_back = 0, n_ignored_start = 0;
  int n_approx_changed = 0, n_negative = 0;
  int cell_errors [NUM_KINDS];

  logic [7:0] row [8];
  real        sum_err, max_err;
  int         n_out;

  // one transform; `stray` pulses start while busy, `b2b` starts the next
  // transform in the cycle right after this one's last output
  task automatic transform(input bit stray);
    int cyc, got, want, exact;
    real e;
    for (int i = 0; i < 8; i++) x_in[i] = row[i];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!out_valid && cyc < 200) begin
      if (stray && cyc == 20) begin
        start = 1'b1;   // must be ignored
        n_ignored_start++;
      end else start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    checks++;
    if (cyc != 67) begin
      failures++;
      $display("first output after %0d cycles, expected 67", cyc);
    end
    for (int k = 0; k < 8; k++) begin
      got  = int'(o1);
      want = ref_dct(row, k, CPL_APPROX4, 8, ACC_W);
      exact = 0;
      for (int n = 0; n < 8; n++) exact += int'(row[n]) * ref_coef(k, n);
      checks += 2;
      if (!out_valid || out_index !== idx_t'(k) || done !== (k == 7)) begin
        failures++;
        $display("output %0d: handshake wrong", k);
      end
      if (got != want) begin
        failures++;
        $display("Y(%0d)=%0d expected %0d", k, got, want);
      end
      if (got != exact) n_approx_changed++;
      if (got < 0) n_negative++;
      e = real'(got - exact) / 256.0;
      if (e < 0) e = -e;
      sum_err += e;
      if (e > max_err) max_err = e;
      n_out++;
      if (k < 7) @(negedge clk);
    end
    n_transforms++;
  endtask

  initial begin
    logic [7:0] st, ct, sx, cx;
    rst_n = 1'b0; start = 1'b0; x_in = '0;
    cell_a = 1'b0; cell_b = 1'b0; cell_cin = 1'b0;
    sum_err = 0.0; max_err = 0.0; n_out = 0;
    foreach (cell_errors[i]) cell_errors[i] = 0;

    // part 1: the cells
    sx = sum_table(CPL_CONV);
    cx = cout_table(CPL_CONV);
    for (int r = 0; r < 8; r++) begin
      {cell_a, cell_b, cell_cin} = 3'(r);
      #1;
      for (int kd = 0; kd < int'(NUM_KINDS); kd++) begin
        st = sum_table(cpl_kind_e'(kd));
        ct = cout_table(cpl_kind_e'(kd));
        checks++;
        if (cell_sum[kd] !== st[r] || cell_cout[kd] !== ct[r]) begin
          failures++;
          $display("cell %0d row %03b wrong", kd, r[2:0]);
        end
        if (cell_sum[kd] !== sx[r]) cell_errors[kd]++;
        if (cell_cout[kd] !== cx[r]) cell_errors[kd]++;
      end
    end
    checks += 5;
    if (cell_errors[0] != 0 || cell_errors[1] != 0) failures++;
    if (cell_errors[2] != 2) failures++;
    if (cell_errors[3] != 2) failures++;
    if (cell_errors[4] != 4) failures++;
    if (cell_errors[2] + cell_errors[3] + cell_errors[4] == 0) failures++;
    $display("cell error rows: conv %0d, approx1 %0d, approx2 %0d, approx3 %0d, approx4 %0d",
             cell_errors[0], cell_errors[1], cell_errors[2], cell_errors[3], cell_errors[4]);

    // part 2: the DCT
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // synthetic image block: row r, column c
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) row[c] = 8'(16 + 24 * c + 6 * r + ((r * 7 + c * 13) % 11));
      transform(r == 3);
      // back to back: start in the cycle after the last output
      @(negedge clk);
      n_back_to_back++;
    end
    for (int t = 0; t < 16; t++) begin
      for (int c = 0; c < 8; c++) row[c] = (t == 0) ? 8'hFF : (t == 1) ? 8'h00 : 8'($urandom);
      transform(t % 5 == 2);
      @(negedge clk);
      if (t % 3 == 0) repeat (4) @(negedge clk);   // idle gaps
      else n_back_to_back++;
    end

    $display("transforms %0d, back-to-back starts %0d, ignored starts %0d, outputs changed by the approximation %0d of %0d, negative outputs %0d",
             n_transforms, n_back_to_back, n_ignored_start, n_approx_changed, n_out, n_negative);
    $display("approximate vs exact: mean %f, largest %f pixel units", sum_err / n_out, max_err);
    checks += 5;
    if (n_transforms == 0)     failures++;
    if (n_back_to_back == 0)   failures++;
    if (n_ignored_start == 0)  failures++;
    if (n_approx_changed == 0) failures++;
    if (n_negative == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
