// tb_dct_sample_reg: loads random pixel rows into the input register and
// checks that the row appears one cycle after load, that the register holds
// while load is low and that reset clears it.
module tb_dct_sample_reg;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, load;
  pix_t [N-1:0] x_in, x_out, expect_q;

  dct_sample_reg dut (.clk, .rst_n, .load, .x_in, .x_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; x_in = '0;
    @(negedge clk);
    checks++;
    if (x_out !== '0) failures++;
    rst_n = 1'b1;
    expect_q = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load = 1'($urandom);
      for (int n = 0; n < int'(N); n++) x_in[n] = pix_t'($urandom);
      @(posedge clk);
      if (load) expect_q = x_in;
      #1;
      checks++;
      if (x_out !== expect_q) begin
        failures++;
        $display("t=%0d: x_out=%h expected %h", t, x_out, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
