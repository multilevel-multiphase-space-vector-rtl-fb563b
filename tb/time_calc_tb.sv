// time_calc_tb -- checks the switching times. Worked example: the sorted
// fractions [0.75, 0.43, 0.42, 0.27, 0.13] give times
// [0.25, 0.32, 0.01, 0.15, 0.14, 0.13]. Random sorted vectors are compared
// with the differences computed in the testbench, and every set of times
// must add up to one period (4096).
module time_calc_tb;
  import svpwm_pkg::*;
  localparam int P = 5, F = 12, TW = F + 1;

  logic [P-1:0][F-1:0] val;
  logic [P:0][TW-1:0]  t;
  int checks = 0, failures = 0;

  time_calc #(.P(P), .FRAC_W(F)) dut (.val(val), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [P];
    int e, sum;
    static real ex_t [P+1] = '{0.25, 0.32, 0.01, 0.15, 0.14, 0.13};
    real d;
    val[0] = 3072; val[1] = 1761; val[2] = 1720; val[3] = 1106; val[4] = 532;
    #1;
    for (int j = 0; j <= P; j++) begin
      d = real'(t[j]) / 4096.0 - ex_t[j];
      checks++;
      if (d > 0.006 || d < -0.006) begin
        failures++;
        $display("FAIL example t%0d=%f", j + 1, real'(t[j]) / 4096.0);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      // Random descending vector.
      v[0] = (n % 7 == 0) ? 0 : int'($urandom_range(0, 4095));
      for (int r = 1; r < P; r++) v[r] = (n % 5 == 0) ? v[r-1] : int'($urandom_range(0, v[r-1]));
      for (int r = 0; r < P; r++) val[r] = F'(v[r]);
      #1;
      sum = 0;
      for (int j = 0; j <= P; j++) begin
        if (j == 0)      e = 4096 - v[0];
        else if (j == P) e = v[P-1];
        else             e = v[j-1] - v[j];
        sum += int'(t[j]);
        checks++;
        if (int'(t[j]) != e) begin
          failures++;
          $display("FAIL t%0d=%0d expected %0d", j + 1, t[j], e);
        end
      end
      checks++;
      if (sum != 4096) begin
        failures++;
        $display("FAIL sum=%0d", sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
