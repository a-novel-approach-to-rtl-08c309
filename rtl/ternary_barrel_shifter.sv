// ternary_barrel_shifter: reversible (N, K) ternary barrel shifter (rotator).
//
// Rotates N data trits left or right by s = sum_i b_i * 2^i positions, where
// b_i = 1 if control trit ctrl[i] is 1 or 2 and b_i = 0 if it is 0, so s runs
// over 0 .. 2^K - 1 (taken modulo N). dir_right = 0 rotates left
// (data_out[i] = data_in[i - s]), dir_right = 1 rotates right
// (data_out[i] = data_in[i + s]), indices modulo N.
//
// The circuit is built only from reversible gates, ternary Feynman gates (tfg)
// and Modified Fredkin Gates (tmfg), so no wire fans out and every gate output
// that is not used becomes a garbage output:
//   1. tbs_copy makes W = 2^K copies of each data trit and the constant zeros.
//   2. K levels of MFG rows (tbs_level) form, for every output trit and each
//      direction, a binary selection tree over the W candidates
//      data_in[i -/+ t], t = 0 .. W-1. Level l halves the candidates using b_(l-1).
//      Level 1 has N*W/2 gates and each gate serves both directions: with data
//      (data_in[i-2m], data_in[i-2m-1]) its s output is a left-shift candidate
//      of output i and its r output a right-shift candidate of output i-4m-1.
//      Levels 2..K have N*W/2^l gates per direction; their r outputs are garbage.
//   3. tbs_final selects the left or the right result onto data_out.
// The constant 0 on the A input of every level-1 gate comes from the
// zero-generating Feynman gates (or a constant where they run short); later
// levels reuse the 0 that earlier gates return on P.
//
// garbage[] collects every unused gate output, level by level: the control
// chain end, then (levels >= 2) the r outputs, then the P zeros the next level
// does not need; last the direction stage's s outputs and its chain ends.
// Its width equals the closed-form garbage count of the design, and together
// with data_out it determines the inputs uniquely (the circuit is reversible).
//
// Purely combinational, no clock or reset. N = 4, K = 2 is the worked example
// of the design. The gate-level structure follows the design; the trit encoding,
// the control reading (0 = no shift, 1 or 2 = shift), the wiring order and the
// doubling of the MFG rows at levels 2..K are this implementation's choices.
module ternary_barrel_shifter
  import tbs_pkg::*;
#(
  parameter int unsigned N = 4,   // data trits (n)
  parameter int unsigned K = 2,   // shift-control trits (k), at least 2
  localparam int unsigned NG = garbage_count(N, K)
) (
  input  trit_t [N-1:0]  data_in,
  input  trit_t [K-1:0]  ctrl,
  input  logic           dir_right,
  output trit_t [N-1:0]  data_out,
  output trit_t [NG-1:0] garbage
);
  localparam int unsigned W  = 1 << K;
  localparam int unsigned H  = W / 2;
  localparam int unsigned NZ = 2 * N * (K - 1);

  if (K < 2) begin : g_bad_k
    $error("ternary_barrel_shifter: K must be at least 2");
  end

  // Offset of level l's garbage in the garbage bus.
  function automatic int unsigned lvl_garbage(int unsigned l);
    int unsigned g = 1;
    if (l >= 2) g += lvl_gates(N, K, l);
    g += (l == K) ? lvl_gates(N, K, l) : lvl_gates(N, K, l) - lvl_gates(N, K, l + 1);
    return g;
  endfunction

  function automatic int unsigned garbage_base(int unsigned l);
    int unsigned o = 0;
    for (int unsigned x = 1; x < l; x++) o += lvl_garbage(x);
    return o;
  endfunction

  // ---- 1. copy network ----------------------------------------------------
  trit_t din    [N];
  trit_t copies [N][W];
  trit_t zeros  [NZ];

  for (genvar p = 0; p < N; p++) begin : g_din
    assign din[p] = data_in[p];
  end

  tbs_copy #(.N(N), .K(K)) u_copy (.data(din), .copies(copies), .zeros(zeros));

  // ---- 2. shift levels ----------------------------------------------------
  for (genvar l = 1; l <= K; l++) begin : lv
    localparam int unsigned M  = lvl_gates(N, K, l);
    localparam int unsigned ML = W >> l;        // candidates per output after level l
    trit_t a [M];
    trit_t c [M];
    trit_t d [M];
    trit_t p [M];
    trit_t r [M];
    trit_t s [M];
    trit_t q_end;
    trit_t lnode [N][ML];                       // left-shift candidates
    trit_t rnode [N][ML];                       // right-shift candidates

    tbs_level #(.M(M)) u_level (
      .ctrl(ctrl[l-1]), .a(a), .c(c), .d(d), .p(p), .r(r), .s(s), .q_end(q_end)
    );

    if (l == 1) begin : g_first
      // gate t = i*H + m selects between data[i-2m] (c) and data[i-2m-1] (d)
      for (genvar i = 0; i < N; i++) begin : g_i
        for (genvar m = 0; m < H; m++) begin : g_m
          localparam int unsigned T = i * H + m;
          assign a[T] = (T < NZ) ? zeros[T] : T0;
          assign c[T] = copies[mod_n(int'(i) - 2 * int'(m), int'(N))][m];
          assign d[T] = copies[mod_n(int'(i) - 2 * int'(m) - 1, int'(N))][H + m];
          assign lnode[i][m] = s[T];
          // right candidate (j, m) comes from the gate of output i = j + 4m + 1
          assign rnode[i][m] = r[mod_n(int'(i) + 4 * int'(m) + 1, int'(N)) * H + m];
        end
      end
    end else begin : g_next
      // left gates 0 .. N*ML-1, right gates N*ML .. 2*N*ML-1
      for (genvar i = 0; i < N; i++) begin : g_i
        for (genvar m = 0; m < ML; m++) begin : g_m
          localparam int unsigned TL = i * ML + m;
          localparam int unsigned TR = N * ML + i * ML + m;
          assign a[TL] = lv[l-1].p[TL];
          assign a[TR] = lv[l-1].p[TR];
          assign c[TL] = lv[l-1].lnode[i][2*m];
          assign d[TL] = lv[l-1].lnode[i][2*m+1];
          assign c[TR] = lv[l-1].rnode[i][2*m];
          assign d[TR] = lv[l-1].rnode[i][2*m+1];
          assign lnode[i][m] = s[TL];
          assign rnode[i][m] = s[TR];
        end
      end
    end

    // garbage of this level
    localparam int unsigned GB = garbage_base(l);
    localparam int unsigned MN = (l == K) ? 0 : lvl_gates(N, K, l + 1);
    assign garbage[GB] = q_end;
    if (l >= 2) begin : g_rg
      for (genvar g = 0; g < M; g++) begin : g_r
        assign garbage[GB + 1 + g] = r[g];
      end
    end
    for (genvar g = MN; g < M; g++) begin : g_pg
      assign garbage[GB + 1 + ((l >= 2) ? M : 0) + g - MN] = p[g];
    end
  end

  // ---- 3. direction stage ---------------------------------------------------
  trit_t right_res [N];
  trit_t left_res  [N];
  trit_t fin_r     [N];
  trit_t fin_s     [N];
  trit_t fin_p, fin_q;

  for (genvar i = 0; i < N; i++) begin : g_res
    assign right_res[i] = lv[K].rnode[i][0];
    assign left_res[i]  = lv[K].lnode[i][0];
  end

  tbs_final #(.N(N)) u_final (
    .dir_a(dir_right ? T0 : T1), .dir_b(dir_right ? T1 : T0),
    .c(right_res), .d(left_res),
    .r(fin_r), .s(fin_s), .p_end(fin_p), .q_end(fin_q)
  );

  localparam int unsigned GF = garbage_base(K + 1);
  for (genvar i = 0; i < N; i++) begin : g_out
    assign data_out[i]     = fin_r[i];
    assign garbage[GF + i] = fin_s[i];
  end
  assign garbage[GF + N]     = fin_p;
  assign garbage[GF + N + 1] = fin_q;

endmodule
