// tbs_copy_tb: checks the Feynman copy network at N = 4, K = 2 and N = 5, K = 3.
// For random trit vectors every copy must equal its source trit and every
// generated constant must be 0.
module tbs_copy_tb;
  import tbs_pkg::*;
  int checks = 0, failures = 0;

  trit_t d0 [4];
  trit_t c0 [4][4];
  trit_t z0 [8];
  trit_t d1 [5];
  trit_t c1 [5][8];
  trit_t z1 [20];

  tbs_copy #(.N(4), .K(2)) dut0 (.data(d0), .copies(c0), .zeros(z0));
  tbs_copy #(.N(5), .K(3)) dut1 (.data(d1), .copies(c1), .zeros(z1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      foreach (d0[i]) d0[i] = trit_t'($urandom_range(2));
      foreach (d1[i]) d1[i] = trit_t'($urandom_range(2));
      #1;
      foreach (c0[i, j]) begin checks++; if (c0[i][j] != d0[i]) failures++; end
      foreach (c1[i, j]) begin checks++; if (c1[i][j] != d1[i]) failures++; end
      foreach (z0[i]) begin checks++; if (z0[i] != 2'd0) failures++; end
      foreach (z1[i]) begin checks++; if (z1[i] != 2'd0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
