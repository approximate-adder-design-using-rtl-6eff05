// tb_cpl_rca: random test of the CPL ripple-carry adder.
//
// Six instances cover every cell kind (approximate low part of 8 bits in a
// 20-bit word) plus a 12-bit adder that is approximate in all its bits. Each
// is fed random operands and carry-in; the sum and carry are compared with
// a bit-serial model built from the published truth tables. For the exact
// kinds the sum is also compared with plain integer addition.
module tb_cpl_rca;
  import cpl_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 20;
  localparam int L = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] s [5];
  logic         co [5];
  logic [11:0]  a12, b12, s12;
  logic         co12;

  cpl_rca #(.WIDTH(W), .KIND(CPL_CONV),    .APPROX_LSBS(L)) u0 (.a, .b, .cin, .sum(s[0]), .cout(co[0]));
  cpl_rca #(.WIDTH(W), .KIND(CPL_APPROX1), .APPROX_LSBS(L)) u1 (.a, .b, .cin, .sum(s[1]), .cout(co[1]));
  cpl_rca #(.WIDTH(W), .KIND(CPL_APPROX2), .APPROX_LSBS(L)) u2 (.a, .b, .cin, .sum(s[2]), .cout(co[2]));
  cpl_rca #(.WIDTH(W), .KIND(CPL_APPROX3), .APPROX_LSBS(L)) u3 (.a, .b, .cin, .sum(s[3]), .cout(co[3]));
  cpl_rca #(.WIDTH(W), .KIND(CPL_APPROX4), .APPROX_LSBS(L)) u4 (.a, .b, .cin, .sum(s[4]), .cout(co[4]));
  cpl_rca #(.WIDTH(12), .KIND(CPL_APPROX4), .APPROX_LSBS(12)) u5 (.a(a12), .b(b12), .cin, .sum(s12), .cout(co12));


  function automatic longint unsigned ref_add_c(longint unsigned x, longint unsigned y, logic c0,
                                                int w, cpl_kind_e kind, int l);
    longint unsigned r = 0;
    logic c = c0;
    cpl_kind_e k;
    logic [2:0] row;
    logic [7:0] st, ct;
    for (int i = 0; i < w; i++) begin
      k   = (i < l) ? kind : CPL_CONV;
      row = {x[i], y[i], c};
      st  = sum_table(k);
      ct  = cout_table(k);
      r[i] = st[row];
      c    = ct[row];
    end
    r[w] = c;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int approx_diff = 0;

  initial begin
    longint unsigned r;
    for (int t = 0; t < 2000; t++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      if (t < 4) begin a = '1; b = '0; cin = 1'b1; end   // full carry ripple
      a12 = a[11:0];
      b12 = b[11:0];
      @(posedge clk);
      for (int k = 0; k < 5; k++) begin
        r = ref_add_c(a, b, cin, W, cpl_kind_e'(k), L);
        checks++;
        if ({co[k], s[k]} !== (W+1)'(r)) begin
          failures++;
          $display("kind %0d: %h + %h + %b = %h, expected %h", k, a, b, cin, {co[k], s[k]}, (W+1)'(r));
        end
        if (k <= 1) begin
          checks++;
          if ({co[k], s[k]} !== (W+1)'({1'b0, a} + {1'b0, b} + (W+1)'(cin))) failures++;
        end else if (s[k] != s[0]) approx_diff++;
      end
      r = ref_add_c(a12, b12, cin, 12, CPL_APPROX4, 12);
      checks++;
      if ({co12, s12} !== 13'(r)) begin
        failures++;
        $display("12-bit: %h + %h = %h, expected %h", a12, b12, {co12, s12}, 13'(r));
      end
    end
    // the approximate kinds must actually differ from the exact sum sometimes
    checks++;
    if (approx_diff == 0) failures++;
    $display("approximate sums differing from exact: %0d", approx_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
