// tmfg: 4x4 ternary Modified Fredkin Gate (MFG).
//
// A and B pass through unchanged (P = A, Q = B) and decide the routing of the
// other two trits: if A < B then R = C and S = D, otherwise C and D are
// exchanged (R = D, S = C). The gate is its own inverse, so it is reversible.
// In the shifter A and B carry a constant and a control trit and C, D carry
// data, which makes the gate a pair of complementary 2:1 selectors.
// Purely combinational, no clock. The comparison is unsigned on the two-wire
// code (code 3, which is not a trit, compares as the largest value).
module tmfg
  import tbs_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t c,
  input  trit_t d,
  output trit_t p,
  output trit_t q,
  output trit_t r,
  output trit_t s
);
  logic pass;
  assign pass = a < b;
  assign p = a;
  assign q = b;
  assign r = pass ? c : d;
  assign s = pass ? d : c;
endmodule
