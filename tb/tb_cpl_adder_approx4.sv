// tb_cpl_adder_approx4: exhaustive test of the cpl_adder_approx4 cell.
//
// Drives all eight (A, B, Cin) rows several times and compares Sum and Cout
// with the cell's published truth table (tb_ref_pkg), then prints the
// result line. A watchdog ends the run if it stalls.
module tb_cpl_adder_approx4;
  import cpl_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpl_adder_approx4 dut (.a, .b, .cin, .sum, .cout);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] st, ct;
    st = sum_table(CPL_APPROX4);
    ct = cout_table(CPL_APPROX4);
    for (int rep = 0; rep < 4; rep++) begin
      for (int r = 0; r < 8; r++) begin
        {a, b, cin} = 3'(r);
        @(posedge clk);
        checks++;
        if (sum !== st[r] || cout !== ct[r]) begin
          failures++;
          $display("row %03b: sum=%b cout=%b, expected %b %b", r[2:0], sum, cout, st[r], ct[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
