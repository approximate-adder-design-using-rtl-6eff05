// tb_dct_latch2: writes random words at random addresses into the LATCH 2
// bank and compares all eight words with a model after every clock; also
// checks that nothing changes while we is low and that reset clears it.
module tb_dct_latch2;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, we;
  idx_t         addr;
  acc_t         d;
  acc_t [N-1:0] q, model;

  dct_latch2 dut (.clk, .rst_n, .we, .addr, .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; d = '0;
    @(negedge clk);
    checks++;
    if (q !== '0) failures++;
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we   = 1'($urandom);
      addr = idx_t'($urandom);
      d    = acc_t'($urandom);
      @(posedge clk);
      if (we) model[addr] = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("t=%0d: bank differs from model", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
