// tb_dct_mux1: checks that MUX 1 returns pixel X(sel) for random rows and
// every select value.
module tb_dct_mux1;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  idx_t         sel;
  pix_t [N-1:0] x;
  pix_t         y;
  pix_t         row [N];

  dct_mux1 dut (.sel, .x, .y);

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
        row[n] = pix_t'($urandom);
        x[n]   = row[n];
      end
      for (int s = 0; s < int'(N); s++) begin
        sel = idx_t'(s);
        @(posedge clk);
        checks++;
        if (y !== row[s]) begin
          failures++;
          $display("sel=%0d: y=%h expected %h", s, y, row[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
