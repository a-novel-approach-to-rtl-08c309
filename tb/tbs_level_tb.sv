// tbs_level_tb: checks one MFG shift level with M = 8 gates.
// Drives random control, constant and data trits. Every gate sees the same
// control through the chain, so each must pass (r = c, s = d) when its A trit
// is below the control trit and exchange otherwise; P returns A and the chain
// end returns the control. Counts both selections.
module tbs_level_tb;
  import tbs_pkg::*;
  localparam int M = 8;
  int checks = 0, failures = 0, n_pass = 0, n_swap = 0;
  trit_t ctrl, q_end;
  trit_t a [M], c [M], d [M], p [M], r [M], s [M];

  tbs_level #(.M(M)) dut (.ctrl(ctrl), .a(a), .c(c), .d(d), .p(p), .r(r), .s(s), .q_end(q_end));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      ctrl = trit_t'($urandom_range(2));
      for (int g = 0; g < M; g++) begin
        // mostly the constant 0 the shifter uses, sometimes any trit
        a[g] = (it % 4 == 3) ? trit_t'($urandom_range(2)) : 2'd0;
        c[g] = trit_t'($urandom_range(2));
        d[g] = trit_t'($urandom_range(2));
      end
      #1;
      checks++;
      if (q_end != ctrl) failures++;
      for (int g = 0; g < M; g++) begin
        logic pass;
        pass = int'(a[g]) < int'(ctrl);
        if (pass) n_pass++; else n_swap++;
        checks++;
        if (p[g] != a[g] || r[g] != (pass ? c[g] : d[g]) || s[g] != (pass ? d[g] : c[g])) begin
          failures++;
          $display("FAIL gate %0d ctrl=%0d a=%0d c=%0d d=%0d r=%0d s=%0d", g, ctrl, a[g], c[g], d[g], r[g], s[g]);
        end
      end
    end
    checks++;
    if (n_pass == 0 || n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
