// tfg: 2x2 ternary Feynman gate.
//
// Reversible gate on two trits: the control A passes through (P = A) and the
// target becomes the GF(3) sum Q = (A + B) mod 3. With B tied to 0 the gate
// copies A onto Q, which is how the shifter fans a trit out without breaking
// reversibility; with both inputs 0 it yields two constant zeros.
// Purely combinational, no clock. Ports and function follow the usual
// definition of the gate; the two-wire trit encoding is this design's choice.
module tfg
  import tbs_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t p,
  output trit_t q
);
  assign p = a;
  assign q = gf3_add(a, b);
endmodule
