// cpl_adder_approx3: approximate CPL adder 3 (17-transistor cell).
//
// The third approximation keeps 17 of the 26 transistors. Its sum is wrong
// for (A,B,C) = (0,1,1), giving 1, and its carry is wrong for (1,1,0), giving
// 0: with C = 0 the carry node is tied low, so the generate term is lost.
//
// A CPL cell receives every input together with its complement and steers
// precomputed functions of A and B through two 2:1 pass-transistor
// multiplexers whose select line is the carry input C:
//   Sum  = C ? s1 : s0        Cout = C ? c1 : c0
// This module keeps that structure at logic level: the four candidate nodes
// are formed from the dual-rail inputs and the two multiplexers pick between
// them. Transistor counts and the reduced output swing of pass transistors
// have no logic-level counterpart; only the truth table is modelled.
//   s0 = A XOR B
//   s1 = (NOT A) OR B
//   c0 = 0
//   c1 = A OR B
// Sum error: ABC = 011 -> 1 (exact 0). Cout error: ABC = 110 -> 0 (exact 1).
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module cpl_adder_approx3 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  // complementary (dual-rail) inputs, as a CPL gate is driven
  logic a_n, b_n, cin_n;
  // candidate nodes steered by the carry-in multiplexers
  logic s0, s1, c0, c1;

  always_comb begin
    a_n   = ~a;
    b_n   = ~b;
    cin_n = ~cin;
    s0    = (a & b_n) | (a_n & b);
    s1    = a_n | b;
    c0    = 1'b0;
    c1    = a | b;
    // pass-transistor multiplexers: the C-rail passes one node, the C-bar
    // rail the other
    sum   = (cin & s1) | (cin_n & s0);
    cout  = (cin & c1) | (cin_n & c0);
  end

endmodule
