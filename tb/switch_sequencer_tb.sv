// switch_sequencer_tb -- checks the playback of switching sequences.
// Runs with FRAC_W = 8 and a 300-cycle period to keep the run short. In every
// period a new random sequence (random levels, random times summing to
// 256, many of them zero) is offered 10 cycles after period_start; it must be
// played in the following period. For each period the testbench counts the
// cycles spent on each vector and compares them with
//   ceil(end_j * 300 / 256) - ceil(end_(j-1) * 300 / 256),
// end_j being the running sum of the times, checks that the vectors come in
// order 1 .. P+1, that vectors of zero time never appear, that level equals
// the vector being played, and that period_start repeats every 300 cycles.
module switch_sequencer_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, F = 8, LW = lvl_w(N), TW = F + 1, PER = 300, JW = $clog2(P + 1);
  localparam int PERIODS = 60;

  logic clk = 0, rst_n = 0, seq_valid = 0, period_start;
  logic [P:0][P-1:0][LW-1:0] vs;
  logic [P:0][TW-1:0]        t;
  logic [P-1:0][LW-1:0]      level;
  logic [JW-1:0]             vec_idx;
  int checks = 0, failures = 0, n_zero_skips = 0;

  switch_sequencer #(.P(P), .N(N), .FRAC_W(F), .PERIOD_CYCLES(PER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (PER * (PERIODS + 5)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  typedef struct {
    int lv [P+1][P];
    int tm [P+1];
  } seq_s;

  function automatic seq_s random_seq();
    seq_s s;
    int cut [P];
    int tmp;
    for (int i = 0; i < P; i++) cut[i] = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(0, 256));
    if ($urandom_range(0, 4) == 0) for (int i = 0; i < P; i++) cut[i] = 256;
    for (int i = 0; i < P; i++)
      for (int j = i + 1; j < P; j++)
        if (cut[j] < cut[i]) begin tmp = cut[i]; cut[i] = cut[j]; cut[j] = tmp; end
    for (int j = 0; j <= P; j++) begin
      s.tm[j] = ((j == P) ? 256 : cut[j]) - ((j == 0) ? 0 : cut[j-1]);
      for (int k = 0; k < P; k++) s.lv[j][k] = int'($urandom_range(0, 4)) - 2;
    end
    return s;
  endfunction

  initial begin
    seq_s cur, nxt;
    int cnt [P+1];
    int e_lo, e_hi, end_j, prev_idx;
    bit ok;
    // After reset the active sequence is level 0 for the whole period.
    for (int j = 0; j <= P; j++) begin
      cur.tm[j] = (j == 0) ? 256 : 0;
      for (int k = 0; k < P; k++) cur.lv[j][k] = 0;
    end
    vs = '0;
    t  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!period_start) @(negedge clk);
    for (int m = 0; m < PERIODS; m++) begin
      foreach (cnt[j]) cnt[j] = 0;
      nxt = random_seq();
      prev_idx = 0;
      ok = 1;
      for (int c = 1; c <= PER; c++) begin
        @(negedge clk);
        if (c == 10) begin
          seq_valid = 1;
          for (int j = 0; j <= P; j++) begin
            t[j] = TW'(nxt.tm[j]);
            for (int k = 0; k < P; k++) vs[j][k] = LW'(nxt.lv[j][k]);
          end
        end else seq_valid = 0;
        if (int'(vec_idx) > P || int'(vec_idx) < prev_idx) ok = 0;
        else begin
          prev_idx = int'(vec_idx);
          cnt[vec_idx]++;
          for (int k = 0; k < P; k++)
            if (int'($signed(level[k])) != cur.lv[vec_idx][k]) ok = 0;
        end
        if (period_start != (c == PER)) ok = 0;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL period %0d: order, level or period_start", m);
      end
      end_j = 0;
      for (int j = 0; j <= P; j++) begin
        e_lo = ceil_div(end_j * PER, 256);
        end_j += cur.tm[j];
        e_hi = ceil_div(end_j * PER, 256);
        if (cur.tm[j] == 0) n_zero_skips++;
        checks++;
        if (cnt[j] != e_hi - e_lo) begin
          failures++;
          $display("FAIL period %0d vector %0d: %0d cycles, expected %0d (t=%0d)",
                   m, j + 1, cnt[j], e_hi - e_lo, cur.tm[j]);
        end
      end
      cur = nxt;
    end
    checks++;
    if (n_zero_skips == 0) begin
      failures++;
      $display("FAIL no zero-time vector was exercised");
    end
    $display("zero-time vectors skipped: %0d", n_zero_skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
