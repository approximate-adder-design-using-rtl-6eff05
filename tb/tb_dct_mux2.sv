// tb_dct_mux2: checks that MUX 2 returns word Y(sel) of the bank for random
// banks and every select value.
module tb_dct_mux2;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  idx_t         sel;
  acc_t [N-1:0] d;
  acc_t         y;
  acc_t         words [N];

  dct_mux2 dut (.sel, .d, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < int'(N); n++) begin
        words[n] = acc_t'($urandom);
        d[n]     = words[n];
      end
      for (int s = 0; s < int'(N); s++) begin
        sel = idx_t'(s);
        @(posedge clk);
        checks++;
        if (y !== words[s]) begin
          failures++;
          $display("sel=%0d: y=%h expected %h", s, y, words[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
