// tbs_pkg: shared types and arithmetic for the ternary reversible barrel shifter.
//
// A trit (ternary digit, value 0, 1 or 2) is carried on two binary wires as an
// unsigned number. Code 3 is not a trit; the gates below treat it consistently
// (GF(3) addition reduces it modulo 3, comparisons treat it as the largest
// value) so every gate stays a total function, but callers are expected to
// drive only 0, 1 and 2.
//
// The package also holds the cost formulas of the shifter: the gate, garbage
// and ancilla counts of the structure built in ternary_barrel_shifter, and the
// closed-form lower bounds they are compared with. All are pure functions of
// the data width n and the number of shift-control trits k.
package tbs_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;

  // Addition in GF(3): (a + b) mod 3.
  function automatic trit_t gf3_add(trit_t a, trit_t b);
    logic [2:0] s;
    s = 3'(a) + 3'(b);
    s = s % 3'd3;
    return trit_t'(s);
  endfunction

  function automatic logic is_trit(trit_t t);
    return t != 2'd3;
  endfunction

  // x mod n for a possibly negative x, result in 0..n-1.
  function automatic int unsigned mod_n(int x, int n);
    return int'(((x % n) + n) % n);
  endfunction

  // ---- structure of the (n, k) shifter -----------------------------------
  // W = 2^k copies of each data trit; level l (1..k) merges pairs of level l-1
  // candidates. Level 1 serves both directions with one row of n*W/2 gates;
  // levels 2..k have one row of n*W/2^l gates per direction.

  function automatic int unsigned lvl_gates(int unsigned n, int unsigned k, int unsigned l);
    int unsigned w = 1 << k;
    return (l == 1) ? n * w / 2 : 2 * n * (w >> l);
  endfunction

  // Constant zeros produced by the zero-generating Feynman gates (2 per gate).
  function automatic int unsigned zgen_zeros(int unsigned n, int unsigned k);
    return 2 * n * (k - 1);
  endfunction

  function automatic int unsigned fe_count(int unsigned n, int unsigned k);
    return n * ((1 << k) - 1) + n * (k - 1);
  endfunction

  function automatic int unsigned mfg_count(int unsigned n, int unsigned k);
    int unsigned c = n;  // direction stage
    for (int unsigned l = 1; l <= k; l++) c += lvl_gates(n, k, l);
    return c;
  endfunction

  // Garbage outputs of the built structure (see ternary_barrel_shifter).
  function automatic int unsigned garbage_count(int unsigned n, int unsigned k);
    int unsigned g = 0;
    for (int unsigned l = 1; l <= k; l++) begin
      g += 1;                                       // end of the control chain
      if (l >= 2) g += lvl_gates(n, k, l);          // unused swap output of each gate
      if (l == k) g += lvl_gates(n, k, l);          // all constant-0 pass-throughs
      else        g += lvl_gates(n, k, l) - lvl_gates(n, k, l + 1);
    end
    return g + n + 2;                               // direction stage
  endfunction

  // Constant inputs of the built structure.
  function automatic int unsigned ancilla_count(int unsigned n, int unsigned k);
    int unsigned z = zgen_zeros(n, k);
    int unsigned need = lvl_gates(n, k, 1);
    return n * ((1 << k) - 1) + z + ((need > z) ? need - z : 0) + 2;
  endfunction

  // Closed forms: Theorem-style bounds for the same quantities.
  function automatic int unsigned bound_gates(int unsigned n, int unsigned k);
    int unsigned s = 0;
    for (int unsigned i = 1; i <= k; i++) s += 1 << (k - i);
    return n * ((1 << k) + k - 1) + n * s;
  endfunction

  function automatic int unsigned bound_garbage(int unsigned n, int unsigned k);
    int unsigned s = 0;
    for (int unsigned i = 1; i + 1 <= k; i++) s += 3 * (1 << (k - (i + 1)));
    return n * s + 2 * (n + 1) + k;
  endfunction

  function automatic int unsigned bound_ancilla(int unsigned n, int unsigned k);
    return 3 * n * (1 << k) / 2 - n + 2;
  endfunction

endpackage
