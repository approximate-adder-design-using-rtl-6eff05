// cpl_pkg: shared types for the complementary-pass-transistor-logic (CPL)
// adder cells.
//
// cpl_kind_e names the five 1-bit adder cells: the conventional (exact) CPL
// full adder and its four approximations. Multi-bit adders and the DCT take a
// parameter of this type to choose which cell sits in their low-order bits.
package cpl_pkg;

  typedef enum logic [2:0] {
    CPL_CONV    = 3'd0,  // exact CPL full adder (26 transistors)
    CPL_APPROX1 = 3'd1,  // two transistors removed, still exact
    CPL_APPROX2 = 3'd2,  // Sum wrong for ABCin = 000, 011
    CPL_APPROX3 = 3'd3,  // 17 transistors; Sum wrong for 011, Cout for 110
    CPL_APPROX4 = 3'd4   // 16 transistors; Sum wrong for 000, 001, 011, Cout for 110
  } cpl_kind_e;

  localparam int unsigned NUM_KINDS = 5;

endpackage
