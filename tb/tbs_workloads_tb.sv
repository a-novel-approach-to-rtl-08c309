// tbs_workloads_tb: the shifter at every (n, k) size of the published cost
// tables (n = 4 .. 64 data trits, k = 2 .. 6 control trits, k <= log2 n).
//
// For each size it checks the garbage-output and ancilla counts of the built
// structure against the tabulated values and the closed forms, and applies
// random data, control and direction words, comparing data_out with a rotation
// computed here. Ancilla counts are checked against 1.5*n*2^k - n + 2.
module tbs_workloads_tb;
  import tbs_pkg::*;

  localparam int NCFG = 15;
  localparam int CN [NCFG] = '{4, 8, 16, 32, 64,  8, 16, 32, 64,  16, 32, 64,  32, 64,  64};
  localparam int CK [NCFG] = '{2, 2,  2,  2,  2,  3,  3,  3,  3,   4,  4,  4,   5,  5,   6};
  localparam int TGO [NCFG] = '{24, 44, 84, 164, 324, 93, 181, 357, 709, 374, 742, 1478, 1511, 3015, 6088};
  localparam int ITERS = 300;

  int checks = 0, failures = 0, done = 0;
  int n_left = 0, n_right = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int N  = CN[g];
    localparam int K  = CK[g];
    localparam int NG = garbage_count(N, K);
    trit_t [N-1:0]  data_in, data_out;
    trit_t [K-1:0]  ctrl;
    logic           dir_right;
    trit_t [NG-1:0] garbage;

    ternary_barrel_shifter #(.N(N), .K(K)) dut (
      .data_in(data_in), .ctrl(ctrl), .dir_right(dir_right),
      .data_out(data_out), .garbage(garbage)
    );

    initial begin
      int an;
      checks++;
      if (NG != TGO[g] || bound_garbage(N, K) != TGO[g]) begin
        failures++; $display("FAIL (%0d,%0d) garbage %0d, table %0d", N, K, NG, TGO[g]);
      end
      an = ancilla_count(N, K);
      checks++;
      if (an != bound_ancilla(N, K)) begin
        failures++; $display("FAIL (%0d,%0d) ancilla %0d, closed form %0d", N, K, an, bound_ancilla(N, K));
      end
      $display("(%0d,%0d): Feynman %0d, MFG %0d (bound %0d total), garbage %0d, ancilla %0d",
               N, K, fe_count(N, K), mfg_count(N, K), bound_gates(N, K), NG, an);

      for (int it = 0; it < ITERS; it++) begin
        int sh;
        sh = 0;
        for (int i = 0; i < N; i++) data_in[i] = trit_t'($urandom_range(2));
        for (int i = 0; i < K; i++) begin
          ctrl[i] = trit_t'($urandom_range(2));
          if (ctrl[i] != 2'd0) sh += 1 << i;
        end
        dir_right = 1'($urandom_range(1));
        #1;
        if (dir_right) n_right++; else n_left++;
        for (int i = 0; i < N; i++) begin
          int src;
          src = dir_right ? (i + sh) % N : ((i - sh) % N + N) % N;
          checks++;
          if (data_out[i] != data_in[src]) begin
            failures++;
            $display("FAIL (%0d,%0d) shift %0d right=%0d out[%0d]", N, K, sh, dir_right, i);
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    checks++;
    if (n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
