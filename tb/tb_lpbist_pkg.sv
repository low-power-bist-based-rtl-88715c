// tb_lpbist_pkg -- self-checking testbench for the weight helpers of
// lpbist_pkg.
//
// All 16 pairs of weights are checked against the compatibility rule (two
// weights conflict only when both are specified, i.e. not x, and differ) and
// the merge rule (the specified weight wins; merging x with x gives x).
module tb_lpbist_pkg;
  import lpbist_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    weight_t all [4] = '{W_X, W_0, W_1, W_R};
    foreach (all[i])
      foreach (all[j]) begin
        weight_t a, b, m;
        bit exp_ok;
        a = all[i]; b = all[j];
        exp_ok = (i == 0) || (j == 0) || (i == j);
        checks++;
        if (w_compatible(a, b) != exp_ok) begin
          failures++;
          $display("FAIL: compatible(%s, %s) = %0d", a.name(), b.name(), w_compatible(a, b));
        end
        m = w_merge(a, b);
        if (exp_ok) begin
          checks++;
          if (m != ((i == 0) ? b : a)) begin
            failures++;
            $display("FAIL: merge(%s, %s) = %s", a.name(), b.name(), m.name());
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
