// svpwm_top_tb -- end-to-end test of the modulator at its default size
// (five phases, five levels, 50 MHz clock, 10 kHz modulation period of 5000
// cycles, 50-cycle dead time).
//
// Scenes, played one after the other:
//   * zero reference (all fractions zero: only the first vector has time);
//   * the worked example v_r = [1.43, 1.13, -0.73, -1.58, -0.25]: the six
//     switching vectors and their cycle counts are checked one by one;
//   * one 50 Hz cycle (200 periods) of a balanced five-phase sine for each of
//     the four laboratory cases (m1, m3) = (1.8, 0), (1.8, 0.3), (0.8, 0),
//     (0.8, 0.13), with the third harmonic added to the reference;
//   * a few periods of a reference beyond the inverter range (saturation).
// Every period and phase the sum of the commanded level over the period must
// equal the exact value implied by the reference sampled one period before,
//   vi * 5000 + 5000 - ceil((4096 - vf) * 5000 / 4096),
// levels may only rise within a period, by one step per phase, and the phase
// voltages rebuilt from the gate signals (cell = +1 with leg A up and leg B
// down, -1 the other way, 0 with both legs alike, unchanged during dead
// time) may differ from the commanded ones by the dead time only. High
// modulation indices must use all five levels, low ones only three.
// Mechanisms counted (each must occur): saturation, zero-time vectors
// (periods whose vector index skips a value),
// level pulses shorter than the dead time (absorbed by the dead time),
// five-level and three-level operation.
module svpwm_top_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, F = 12, LW = lvl_w(N), RW = LW + F, C = 2;
  localparam int PER = 5000, DEAD = 50;

  logic clk = 0, rst_n = 0;
  logic [P-1:0][RW-1:0] vr;
  logic [P-1:0][C-1:0]  gate_a_hi, gate_a_lo, gate_b_hi, gate_b_lo;
  logic [P-1:0][LW-1:0] level;
  logic [2:0]           vec_idx;
  logic                 period_start;

  svpwm_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int n_zero_t = 0, n_five = 0, n_three = 0;

  svpwm_top_checker #(.P(P), .N(N), .F(F), .PER(PER), .DEAD(DEAD)) u_chk (.*);

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  initial begin
    repeat (1_300_000 * 5) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end

  // Zero-time vectors: a period whose vector index does not run through
  // 0, 1, ..., P one step at a time skipped at least one vector.
  int prev_idx = 0;
  bit skipped = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (period_start) begin
        if (prev_idx != P) skipped = 1;
        if (skipped) n_zero_t++;
        skipped = 0;
        prev_idx = -1;
      end else begin
        if (int'(vec_idx) > prev_idx + 1) skipped = 1;
        prev_idx = int'(vec_idx);
      end
    end
  end

  // Drive a reference for a number of periods (changing at period starts).
  task automatic set_ref(input real v [P]);
    for (int k = 0; k < P; k++) vr[k] = RW'(int'($floor(v[k] * 4096.0 + 0.5)));
  endtask

  task automatic wait_period();
    @(negedge clk);
    while (!period_start) @(negedge clk);
  endtask

  task automatic sine_case(input real m1, input real m3);
    real v [P];
    real ph;
    u_chk.used_lo = 0; u_chk.used_hi = 0;
    for (int n = 0; n < 200; n++) begin
      // The period that starts now still plays the previous case's reference.
      if (n == 1) begin #1; u_chk.used_lo = 0; u_chk.used_hi = 0; end
      for (int k = 0; k < P; k++) begin
        ph = 2.0 * 3.14159265358979 * (real'(n) / 200.0 + real'(k) / real'(P));
        v[k] = m1 * $sin(ph) + m3 * $sin(3.0 * ph);
      end
      set_ref(v);
      wait_period();
    end
    wait_period();   // let the last period be played
    checks++;
    if (m1 > 1.0) begin
      if (u_chk.used_lo == -2 && u_chk.used_hi == 2) n_five++;
      else begin failures++; $display("FAIL m1=%0.2f used levels %0d..%0d", m1, u_chk.used_lo, u_chk.used_hi); end
    end else begin
      if (u_chk.used_lo == -1 && u_chk.used_hi == 1) n_three++;
      else begin failures++; $display("FAIL m1=%0.2f used levels %0d..%0d", m1, u_chk.used_lo, u_chk.used_hi); end
    end
    $display("case m1=%0.2f m3=%0.2f: levels %0d..%0d", m1, m3, u_chk.used_lo, u_chk.used_hi);
  endtask

  initial begin
    static real z [P] = '{0.0, 0.0, 0.0, 0.0, 0.0};
    static real ex [P] = '{1.43, 1.13, -0.73, -1.58, -0.25};
    static real big [P] = '{2.7, -3.1, 1.999, -2.0, 0.5};
    static int ex_vs [P+1][P] = '{'{1, 1, -1, -2, -1}, '{1, 1, -1, -2, 0}, '{2, 1, -1, -2, 0},
                           '{2, 1, -1, -1, 0}, '{2, 1, 0, -1, 0}, '{2, 2, 0, -1, 0}};
    static int ex_t [P+1] = '{1024, 1311, 41, 614, 574, 532};
    int cnt [P+1];
    int end_j, e_lo, e_hi;
    bit ok;
    set_ref(z);
    repeat (5) @(negedge clk);
    rst_n = 1;
    // Zero reference: one vector holds the whole period.
    wait_period();
    wait_period();
    // Worked example: sampled at this period start, played in the next.
    set_ref(ex);
    wait_period();
    set_ref(z);
    foreach (cnt[j]) cnt[j] = 0;
    ok = 1;
    for (int c = 1; c <= PER; c++) begin
      @(negedge clk);
      cnt[vec_idx]++;
      for (int k = 0; k < P; k++)
        if (int'($signed(level[k])) != ex_vs[vec_idx][k]) ok = 0;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL example: levels differ from the switching vectors"); end
    end_j = 0;
    for (int j = 0; j <= P; j++) begin
      e_lo = ceil_div(end_j * PER, 4096);
      end_j += ex_t[j];
      e_hi = ceil_div(end_j * PER, 4096);
      checks++;
      if (cnt[j] != e_hi - e_lo) begin
        failures++;
        $display("FAIL example vector %0d on for %0d cycles, expected %0d", j + 1, cnt[j], e_hi - e_lo);
      end
    end
    $display("example: cycles per vector %0d %0d %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]);
    // Laboratory cases.
    sine_case(1.8, 0.0);
    sine_case(1.8, 0.3);
    sine_case(0.8, 0.0);
    sine_case(0.8, 0.8 / 6.0);
    // Over-range reference.
    set_ref(big);
    repeat (3) wait_period();
    set_ref(z);
    repeat (2) wait_period();
    $display("mechanisms: saturation=%0d zero_time=%0d short_pulses=%0d five_level=%0d three_level=%0d",
             u_chk.n_sat, n_zero_t, u_chk.n_short, n_five, n_three);
    checks++;
    if (u_chk.n_sat == 0 || n_zero_t == 0 || u_chk.n_short == 0 || n_five == 0 || n_three == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end
endmodule
