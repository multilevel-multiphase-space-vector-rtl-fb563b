// svpwm_nl_tb -- checks the N-level modulator (five phases, five levels).
// Worked example: v_r = [1.43, 1.13, -0.73, -1.58, -0.25] (V_r = [28.6, 22.6,
// -14.6, -31.6, -5.0] V with a 20 V step) must give the six printed
// switching vectors and times. Random references over the whole range, and
// some beyond it, are then streamed; each result must come 4 cycles after
// its input and meet the modulation law exactly in fixed point:
//   sum_j t_j = 4096,   sum_j v_sj[k] * t_j = clamp(v_r[k]) * 4096,
// with every level inside -2 .. 2 and consecutive vectors differing by +1
// in exactly one phase.
module svpwm_nl_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, F = 12, LW = lvl_w(N), RW = LW + F, TW = F + 1, LAT = 4;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [P-1:0][RW-1:0]      vr;
  logic [P:0][P-1:0][LW-1:0] vs;
  logic [P:0][TW-1:0]        t;
  int checks = 0, failures = 0, cycle = 0, n_sat = 0;

  svpwm_nl #(.P(P), .N(N), .FRAC_W(F)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [P-1:0][RW-1:0] q_vr [$];
  int                   q_cyc [$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      q_vr.push_back(vr);
      q_cyc.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      logic [P-1:0][RW-1:0] x;
      int c, sum, acc, ref_k, lv, dsum;
      bit ok;
      if (q_vr.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        x = q_vr.pop_front();
        c = q_cyc.pop_front();
        checks++;
        if (cycle - c != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - c);
        end
        ok = 1;
        sum = 0;
        for (int j = 0; j <= P; j++) sum += int'(t[j]);
        if (sum != 4096) ok = 0;
        for (int k = 0; k < P; k++) begin
          ref_k = int'($signed(x[k]));
          if (ref_k > 8191) ref_k = 8191;
          if (ref_k < -8192) ref_k = -8192;
          acc = 0;
          for (int j = 0; j <= P; j++) begin
            lv = int'($signed(vs[j][k]));
            if (lv < -2 || lv > 2) ok = 0;
            acc += lv * int'(t[j]);
          end
          if (acc != ref_k) ok = 0;
        end
        for (int j = 1; j <= P; j++) begin
          dsum = 0;
          for (int k = 0; k < P; k++) begin
            lv = int'($signed(vs[j][k])) - int'($signed(vs[j-1][k]));
            if (lv < 0 || lv > 1) ok = 0;
            dsum += lv;
          end
          if (dsum != 1) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL vr=%h vs=%h t=%h", x, vs, t);
        end
      end
    end
  end

  initial begin
    static real ex_r [P] = '{1.43, 1.13, -0.73, -1.58, -0.25};
    static int ex_vs [P+1][P] = '{'{1, 1, -1, -2, -1}, '{1, 1, -1, -2, 0}, '{2, 1, -1, -2, 0},
                           '{2, 1, -1, -1, 0}, '{2, 1, 0, -1, 0}, '{2, 2, 0, -1, 0}};
    static real ex_t [P+1] = '{0.25, 0.32, 0.01, 0.15, 0.14, 0.13};
    real d;
    vr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    in_valid <= 1;
    for (int k = 0; k < P; k++) vr[k] <= RW'(int'(ex_r[k] * 4096.0));
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT) @(posedge clk);
    #1;
    for (int j = 0; j <= P; j++) begin
      d = real'(t[j]) / 4096.0 - ex_t[j];
      checks++;
      if (d > 0.006 || d < -0.006) begin
        failures++;
        $display("FAIL example t%0d = %f", j + 1, real'(t[j]) / 4096.0);
      end
      for (int k = 0; k < P; k++) begin
        checks++;
        if (int'($signed(vs[j][k])) != ex_vs[j][k]) begin
          failures++;
          $display("FAIL example v_s%0d phase %0d = %0d", j + 1, k + 1, $signed(vs[j][k]));
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      for (int k = 0; k < P; k++) begin
        int r;
        r = (n % 10 == 0) ? int'($urandom_range(0, 24000)) - 12000
                          : int'($urandom_range(0, 16383)) - 8192;
        if (r > 8191 || r < -8192) n_sat++;
        vr[k] <= RW'(r);
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q_vr.size() != 0 || n_sat == 0) begin
      failures++;
      $display("FAIL %0d results missing, %0d saturated inputs", q_vr.size(), n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
