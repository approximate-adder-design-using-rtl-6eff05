// cpl_adder_approx4: approximate CPL adder 4 (16-transistor cell).
//
// The fourth and smallest approximation keeps 16 of the 26 transistors. Its
// sum passes B straight through when C = 1 and A NAND B when C = 0; its carry
// loses the generate term as in approximation 3. The sum is wrong in three
// rows and the carry in one. The rows follow the cell's published truth
// table.
//
// A CPL cell receives every input together with its complement and steers
// precomputed functions of A and B through two 2:1 pass-transistor
// multiplexers whose select line is the carry input C:
//   Sum  = C ? s1 : s0        Cout = C ? c1 : c0
// This module keeps that structure at logic level: the four candidate nodes
// are formed from the dual-rail inputs and the two multiplexers pick between
// them. Transistor counts and the reduced output swing of pass transistors
// have no logic-level counterpart; only the truth table is modelled.
//   s0 = A NAND B
//   s1 = B
//   c0 = 0
//   c1 = A OR B
// Sum errors: ABC = 000 -> 1, 001 -> 0, 011 -> 1. Cout error: ABC = 110 -> 0.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module cpl_adder_approx4 (
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
    s0    = a_n | b_n;
    s1    = b;
    c0    = 1'b0;
    c1    = a | b;
    // pass-transistor multiplexers: the C-rail passes one node, the C-bar
    // rail the other
    sum   = (cin & s1) | (cin_n & s0);
    cout  = (cin & c1) | (cin_n & c0);
  end

endmodule
