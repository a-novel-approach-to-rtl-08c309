// tbs_final_tb: checks the direction stage with N = 4.
// With the constant pair (0, 1) every output must carry its c input (right
// result), with (1, 0) its d input (left result); s carries the other one and
// the chain ends return the pair.
module tbs_final_tb;
  import tbs_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0, n_right = 0, n_left = 0;
  trit_t dir_a, dir_b, p_end, q_end;
  trit_t c [N], d [N], r [N], s [N];

  tbs_final #(.N(N)) dut (.dir_a(dir_a), .dir_b(dir_b), .c(c), .d(d), .r(r), .s(s),
                          .p_end(p_end), .q_end(q_end));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      logic right;
      right = it[0];
      dir_a = right ? 2'd0 : 2'd1;
      dir_b = right ? 2'd1 : 2'd0;
      foreach (c[i]) begin
        c[i] = trit_t'($urandom_range(2));
        d[i] = trit_t'($urandom_range(2));
      end
      #1;
      if (right) n_right++; else n_left++;
      checks++;
      if (p_end != dir_a || q_end != dir_b) failures++;
      foreach (r[i]) begin
        checks++;
        if (r[i] != (right ? c[i] : d[i]) || s[i] != (right ? d[i] : c[i])) begin
          failures++;
          $display("FAIL i=%0d right=%0d c=%0d d=%0d r=%0d s=%0d", i, right, c[i], d[i], r[i], s[i]);
        end
      end
    end
    checks++;
    if (n_right == 0 || n_left == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
