// tmfg_tb: exhaustive check of the Modified Fredkin Gate.
// Applies all 81 input combinations of four trits, compares with the rule
// "R = C, S = D if A < B, otherwise exchanged", checks that the gate is a
// bijection on trits (no two inputs give the same output) and that applying
// it twice restores the input.
module tmfg_tb;
  import tbs_pkg::*;
  trit_t a, b, c, d, p, q, r, s;
  trit_t p2, q2, r2, s2;
  int checks = 0, failures = 0;
  bit seen [256];

  tmfg dut  (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  tmfg dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 81; v++) begin
      int ia, ib, ic, id;
      int er, es;
      ia = v % 3; ib = (v / 3) % 3; ic = (v / 9) % 3; id = v / 27;
      a = trit_t'(ia); b = trit_t'(ib); c = trit_t'(ic); d = trit_t'(id);
      #1;
      er = (ia < ib) ? ic : id;
      es = (ia < ib) ? id : ic;
      checks++;
      if (p != a || q != b || r != trit_t'(er) || s != trit_t'(es)) begin
        failures++;
        $display("FAIL %0d%0d%0d%0d -> %0d%0d%0d%0d", ia, ib, ic, id, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) failures++;
      seen[{p, q, r, s}] = 1'b1;
      checks++;
      if (p2 != a || q2 != b || r2 != c || s2 != d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
