// tb_dct_lut: tests the coefficient table and multiply-accumulate stage.
//
// Two instances run side by side on the same stimulus: one with the default
// approximate adder (approximation 4 in the 8 low bits) and one with the
// exact conventional cell. Random pixel rows are pushed through all 64
// (k, n) steps with random idle cycles in between. After every step the
// running sum of each instance is compared with a model that computes the
// coefficient with real arithmetic and adds through the truth-table model of
// the adder; the exact instance is also compared with integer arithmetic.
// Idle cycles must leave the sum unchanged.
module tb_dct_lut;
  import cpl_pkg::*;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, valid, first;
  idx_t k, n;
  pix_t x;
  acc_t acc_ax, acc_ex;

  dct_lut                    dut    (.clk, .rst_n, .valid, .first, .k, .n, .x, .acc(acc_ax));
  dct_lut #(.KIND(CPL_CONV)) dut_ex (.clk, .rst_n, .valid, .first, .k, .n, .x, .acc(acc_ex));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned m_ax, m_ex, mask;
  longint          exact;
  logic [7:0]      row [8];
  int              approx_diff = 0;

  task automatic check(string what);
    checks += 3;
    if (acc_ax !== acc_t'(m_ax)) begin
      failures++;
      $display("%s k=%0d n=%0d: approx acc=%0d expected %0d", what, k, n, acc_ax, $signed(acc_t'(m_ax)));
    end
    if (acc_ex !== acc_t'(m_ex)) begin
      failures++;
      $display("%s k=%0d n=%0d: exact acc=%0d expected %0d", what, k, n, acc_ex, $signed(acc_t'(m_ex)));
    end
    if (acc_ex !== acc_t'(exact)) failures++;
  endtask

  initial begin
    longint p;
    mask  = (64'd1 << ACC_W) - 1;
    rst_n = 1'b0; valid = 1'b0; first = 1'b0; k = '0; n = '0; x = '0;
    m_ax = 0; m_ex = 0; exact = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) row[i] = (t == 0) ? 8'hFF : (t == 1) ? 8'h00 : 8'($urandom);
      for (int kk = 0; kk < 8; kk++) begin
        for (int nn = 0; nn < 8; nn++) begin
          // an idle cycle now and then: the sum must hold
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            valid = 1'b0;
            x = 8'($urandom);
            @(posedge clk); #1;
            check("idle");
          end
          @(negedge clk);
          valid = 1'b1;
          first = (nn == 0);
          k = idx_t'(kk);
          n = idx_t'(nn);
          x = row[nn];
          p = longint'(row[nn]) * longint'(ref_coef(kk, nn));
          m_ax  = ref_add((nn == 0) ? 0 : m_ax, longint'(p) & mask, ACC_W, CPL_APPROX4, 8) & mask;
          m_ex  = ref_add((nn == 0) ? 0 : m_ex, longint'(p) & mask, ACC_W, CPL_CONV, 0) & mask;
          exact = ((nn == 0) ? 0 : exact) + p;
          @(posedge clk); #1;
          check("step");
        end
        // the finished sum must match the whole-row model
        checks++;
        if (acc_ax !== acc_t'(ref_dct(row, kk, CPL_APPROX4, 8, ACC_W))) failures++;
        if (acc_ax != acc_ex) approx_diff++;
      end
    end
    checks++;
    if (approx_diff == 0) failures++;   // the approximation must show
    $display("rows whose approximate Y(k) differs from exact: %0d of %0d", approx_diff, 40 * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
