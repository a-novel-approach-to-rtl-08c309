// tbs_final: direction stage of the ternary barrel shifter, a row of N MFGs.
//
// Both shifting directions are computed in parallel; this stage puts the one
// that was asked for on a single output pin per trit. The pair of constants
// (A, B) = (0, 1) selects the right shift and (1, 0) the left shift. The pair
// enters the first gate and is handed along the row through P and Q; the P
// and Q of the last gate are garbage. With (0, 1), A < B and each gate passes
// (r = c = right result); with (1, 0) it exchanges (r = d = left result). The
// s outputs carry the other direction's result and are garbage.
//
// Interface: dir_a, dir_b (the constant pair), c[N] (right-shift results),
// d[N] (left-shift results); outputs r[N] (shifter result), s[N], p_end,
// q_end. Purely combinational. Constants and row structure follow the design;
// which data input carries which direction is this implementation's choice.
module tbs_final
  import tbs_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  trit_t dir_a,
  input  trit_t dir_b,
  input  trit_t c [N],
  input  trit_t d [N],
  output trit_t r [N],
  output trit_t s [N],
  output trit_t p_end,
  output trit_t q_end
);
  trit_t ca [N+1];
  trit_t cb [N+1];
  assign ca[0] = dir_a;
  assign cb[0] = dir_b;

  for (genvar g = 0; g < N; g++) begin : g_mfg
    tmfg u_mfg (
      .a(ca[g]), .b(cb[g]), .c(c[g]), .d(d[g]),
      .p(ca[g+1]), .q(cb[g+1]), .r(r[g]), .s(s[g])
    );
  end

  assign p_end = ca[N];
  assign q_end = cb[N];
endmodule
