// ternary_barrel_shifter_tb: end-to-end check of the (4, 2) ternary shifter at
// its default parameters.
//
// Applies every input: 3^4 data words x 3^2 control words x 2 directions.
// For each it computes the expected rotation here (shift s = sum b_i 2^i with
// b_i = 1 for a control trit of 1 or 2) and compares data_out. It also checks
// reversibility: no two inputs may give the same (data_out, garbage) word.
// The gate, garbage and ancilla counts of the built structure are compared
// with the closed-form values (24 garbage outputs and 22 ancilla inputs for
// (4, 2)). Every mechanism must occur: left and right rotation, each shift
// amount 0..3, and control trit values 1 and 2 both acting as "shift".
module ternary_barrel_shifter_tb;
  import tbs_pkg::*;
  localparam int N = 4;
  localparam int K = 2;
  localparam int NG = garbage_count(N, K);

  trit_t [N-1:0]  data_in, data_out;
  trit_t [K-1:0]  ctrl;
  logic           dir_right;
  trit_t [NG-1:0] garbage;

  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_ctrl2 = 0, n_ctrl1 = 0;
  int n_amt [4];
  bit seen [logic [2*(N+NG)-1:0]];

  ternary_barrel_shifter dut (
    .data_in(data_in), .ctrl(ctrl), .dir_right(dir_right),
    .data_out(data_out), .garbage(garbage)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_amt[i]) n_amt[i] = 0;

    // structure counts against the closed forms
    checks++;
    if (NG != 24 || bound_garbage(N, K) != 24) begin
      failures++; $display("FAIL garbage count %0d", NG);
    end
    checks++;
    if (ancilla_count(N, K) != 22 || bound_ancilla(N, K) != 22) begin
      failures++; $display("FAIL ancilla count %0d", ancilla_count(N, K));
    end
    checks++;
    if (fe_count(N, K) != 16) failures++;

    for (int dv = 0; dv < 81; dv++) begin
      for (int cv = 0; cv < 9; cv++) begin
        for (int dr = 0; dr < 2; dr++) begin
          int sh, t;
          t = dv;
          for (int i = 0; i < N; i++) begin data_in[i] = trit_t'(t % 3); t /= 3; end
          t = cv;
          sh = 0;
          for (int i = 0; i < K; i++) begin
            ctrl[i] = trit_t'(t % 3);
            if (t % 3 != 0) sh += 1 << i;
            if (t % 3 == 2) n_ctrl2++;
            if (t % 3 == 1) n_ctrl1++;
            t /= 3;
          end
          dir_right = dr[0];
          #1;
          n_amt[sh]++;
          if (dir_right) n_right++; else n_left++;
          for (int i = 0; i < N; i++) begin
            int src;
            src = dir_right ? (i + sh) % N : (i - sh + N) % N;
            checks++;
            if (data_out[i] != data_in[src]) begin
              failures++;
              $display("FAIL in=%h ctrl=%h right=%0d out=%h", data_in, ctrl, dir_right, data_out);
            end
          end
          checks++;
          if (seen.exists({data_out, garbage})) begin
            failures++;
            $display("FAIL output word repeats: in=%h ctrl=%h right=%0d", data_in, ctrl, dir_right);
          end
          seen[{data_out, garbage}] = 1'b1;
        end
      end
    end

    // every mechanism must have happened
    checks++; if (n_left == 0)  begin failures++; $display("FAIL no left rotation");  end
    checks++; if (n_right == 0) begin failures++; $display("FAIL no right rotation"); end
    checks++; if (n_ctrl1 == 0 || n_ctrl2 == 0) begin failures++; $display("FAIL control values"); end
    foreach (n_amt[i]) begin
      checks++;
      if (n_amt[i] == 0) begin failures++; $display("FAIL shift %0d never applied", i); end
    end
    $display("mechanisms: left=%0d right=%0d shift0=%0d shift1=%0d shift2=%0d shift3=%0d ctrl1=%0d ctrl2=%0d distinct_outputs=%0d",
             n_left, n_right, n_amt[0], n_amt[1], n_amt[2], n_amt[3], n_ctrl1, n_ctrl2, seen.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
