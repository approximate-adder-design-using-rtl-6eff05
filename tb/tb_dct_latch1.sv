// tb_dct_latch1: checks that LATCH 1 captures d one cycle after a clock with
// en high, holds otherwise and clears on reset.
module tb_dct_latch1;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, en;
  pix_t d, q, expect_q;

  dct_latch1 dut (.clk, .rst_n, .en, .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; d = '0;
    @(negedge clk);
    checks++;
    if (q !== '0) failures++;
    rst_n = 1'b1;
    expect_q = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = pix_t'($urandom);
      @(posedge clk);
      if (en) expect_q = d;
      #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("t=%0d: q=%h expected %h", t, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
