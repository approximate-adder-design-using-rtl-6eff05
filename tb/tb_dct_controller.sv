// tb_dct_controller: checks the controller's schedule cycle by cycle.
//
// For several transforms (some started back to back, some after idle time,
// with extra start pulses while busy that must be ignored) every output is
// compared, in every cycle, with the schedule worked out from the cycle
// index c counted from the accepted start (c = 0):
//   load in c = 0; SEL 1 = (c-1) mod 8 with LATCH 1 enabled in c = 1..64;
//   LUT step i = c-2 in c = 2..65 (k = i/8, n = i mod 8, first when n = 0);
//   LATCH 2 written at ADDRESS k in c = 10 + 8k; outputs in c = 67..74 with
//   SEL 2 = c-67; done in c = 74; busy in c = 1..74.
module tb_dct_controller;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start;
  logic load, l1_en, lut_valid, lut_first, l2_we, out_valid, busy, done;
  idx_t sel1, lut_k, lut_n, address, sel2;

  dct_controller dut (.clk, .rst_n, .start, .load, .sel1, .l1_en, .lut_valid, .lut_first,
                      .lut_k, .lut_n, .l2_we, .address, .sel2, .out_valid, .busy, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c;   // cycle within the current transform, -1 when idle
  int ops = 0;

  task automatic expect_bit(string nm, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("c=%0d %s=%b expected %b", c, nm, got, want);
    end
  endtask

  task automatic expect_idx(string nm, idx_t got, int want);
    checks++;
    if (got !== idx_t'(want)) begin
      failures++;
      $display("c=%0d %s=%0d expected %0d", c, nm, got, want);
    end
  endtask

  // check the outputs of the current cycle (called after inputs settle)
  task automatic check_cycle();
    int i;
    expect_bit("load", load, c == 0);
    expect_bit("l1_en", l1_en, c >= 1 && c <= 64);
    if (c >= 1 && c <= 64) expect_idx("sel1", sel1, (c - 1) % 8);
    expect_bit("lut_valid", lut_valid, c >= 2 && c <= 65);
    if (c >= 2 && c <= 65) begin
      i = c - 2;
      expect_idx("lut_k", lut_k, i / 8);
      expect_idx("lut_n", lut_n, i % 8);
      expect_bit("lut_first", lut_first, (i % 8) == 0);
    end
    expect_bit("l2_we", l2_we, c >= 10 && c <= 66 && ((c - 10) % 8) == 0);
    if (l2_we) expect_idx("address", address, (c - 10) / 8);
    expect_bit("out_valid", out_valid, c >= 67 && c <= 74);
    if (c >= 67 && c <= 74) expect_idx("sel2", sel2, c - 67);
    expect_bit("done", done, c == 74);
    expect_bit("busy", busy, c >= 1 && c <= 74);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    c = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      // idle gap (none for odd t: back-to-back)
      if (t % 2 == 0) begin
        repeat (3) begin
          @(negedge clk);
          start = 1'b0;
          c = -1;
          #1 check_cycle();
        end
      end
      @(negedge clk);
      start = 1'b1;
      c = 0;
      #1 check_cycle();
      for (int j = 1; j <= 74; j++) begin
        @(negedge clk);
        start = (j % 13 == 0);   // stray starts while busy
        c = j;
        #1 check_cycle();
      end
      ops++;
    end
    @(negedge clk);
    start = 1'b0;
    c = -1;
    #1 check_cycle();
    $display("transforms sequenced: %0d", ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
