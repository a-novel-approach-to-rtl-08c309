// tbs_level: one shift level of the ternary barrel shifter, a row of M MFGs.
//
// The shift-control trit enters the B input of the first gate and is handed
// along the row through each gate's Q output, so all M gates see the same
// control; the Q output of the last gate is a garbage output. Each gate's A
// input is a constant 0, so the MFG rule "pass if A < B" becomes "pass if the
// control trit is 1 or 2": with control 0 the gate exchanges its data inputs
// (r = d, s = c), with control 1 or 2 it passes them (r = c, s = d). Every gate
// is therefore two complementary 2:1 selectors, and the P outputs return the
// constant 0 for reuse by the next level.
//
// Interface: ctrl, and per gate a (constant 0), c and d; outputs p, r, s and
// the chain end q_end. Purely combinational.
// The row of gates with a shared control chain follows the design; putting
// the constant on A and the control on B is this implementation's reading.
module tbs_level
  import tbs_pkg::*;
#(
  parameter int unsigned M = 8   // gates in the row
) (
  input  trit_t ctrl,
  input  trit_t a [M],
  input  trit_t c [M],
  input  trit_t d [M],
  output trit_t p [M],
  output trit_t r [M],
  output trit_t s [M],
  output trit_t q_end
);
  trit_t chain [M+1];
  assign chain[0] = ctrl;

  for (genvar g = 0; g < M; g++) begin : g_mfg
    tmfg u_mfg (
      .a(a[g]), .b(chain[g]), .c(c[g]), .d(d[g]),
      .p(p[g]), .q(chain[g+1]), .r(r[g]), .s(s[g])
    );
  end

  assign q_end = chain[M];
endmodule
