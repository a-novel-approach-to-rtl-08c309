// tfg_tb: exhaustive check of the ternary Feynman gate.
// Applies all nine trit pairs (A, B) and compares P with A and Q with the
// GF(3) sum computed here with integer arithmetic. A watchdog ends the run.
module tfg_tb;
  import tbs_pkg::*;
  trit_t a, b, p, q;
  int checks = 0, failures = 0;

  tfg dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 3; ia++) begin
      for (int ib = 0; ib < 3; ib++) begin
        a = trit_t'(ia); b = trit_t'(ib);
        #1;
        checks++;
        if (p != trit_t'(ia) || q != trit_t'((ia + ib) % 3)) begin
          failures++;
          $display("FAIL a=%0d b=%0d -> p=%0d q=%0d", ia, ib, p, q);
        end
        // B = 0 must copy A
        if (ib == 0) begin
          checks++;
          if (q != a) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
