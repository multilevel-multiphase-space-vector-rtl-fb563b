// svpwm_top_checker -- testbench monitor for svpwm_top.
//
// Watches the reference, the commanded levels and the gate signals of the
// modulator and checks, every modulation period and phase:
//   * the sum of the commanded level over the period equals the exact value
//     implied by the reference sampled one period earlier,
//       vi * PER + PER - ceil((2**F - vf) * PER / 2**F),
//     with vi = floor and vf the fraction of the clamped reference;
//   * inside a period a level only rises, one step at a time;
//   * the period is PER cycles long;
//   * no leg has both switches on, and the phase voltage rebuilt from the
//     gates (cell = +1 with leg A up and leg B down, -1 the other way, 0 with
//     both legs alike, unchanged while a leg is in dead time) differs from
//     the commanded one by no more than the dead time allows.
// It also counts saturated references and level pulses shorter than the dead
// time, and tracks the lowest and highest level seen (the instantiating
// testbench may clear used_lo / used_hi).
module svpwm_top_checker
  import svpwm_pkg::*;
#(
  parameter int P    = 5,
  parameter int N    = 5,
  parameter int F    = 12,
  parameter int PER  = 5000,
  parameter int DEAD = 50,
  localparam int LW  = lvl_w(N),
  localparam int RW  = LW + F,
  localparam int C   = (N - 1) / 2
) (
  input logic                 clk,
  input logic                 rst_n,
  input logic [P-1:0][RW-1:0] vr,
  input logic [P-1:0][C-1:0]  gate_a_hi,
  input logic [P-1:0][C-1:0]  gate_a_lo,
  input logic [P-1:0][C-1:0]  gate_b_hi,
  input logic [P-1:0][C-1:0]  gate_b_lo,
  input logic [P-1:0][LW-1:0] level,
  input logic                 period_start
);

  localparam int ONE = 1 << F;
  localparam int VMAX = ((N - 1) / 2) * ONE - 1;
  localparam int VMIN = -((N - 1) / 2) * ONE;

  int checks = 0, failures = 0, n_sat = 0, n_short = 0, n_periods = 0;

  initial begin
    for (int k = 0; k < P; k++) begin
      prev_lvl[k] = 0; run_len[k] = 0; cur_code[k] = 0; smp_code[k] = 0;
      lvl_sum[k] = 0; gate_sum[k] = 0;
      for (int c = 0; c < C; c++) begin leg_a_s[k][c] = 0; leg_b_s[k][c] = 0; end
    end
  end

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int clamp_code(input int c);
    if (c > VMAX) return VMAX;
    if (c < VMIN) return VMIN;
    return c;
  endfunction

  // Floor split of a clamped code.
  function automatic int code_int(input int c);
    return (c >= 0) ? c / ONE : -((-c + ONE - 1) / ONE);
  endfunction

  // Commanded level sum over one period for reference code c.
  function automatic int expected_sum(input int c);
    int cc, vi, vf;
    cc = clamp_code(c);
    vi = code_int(cc);
    vf = cc - vi * ONE;
    return vi * PER + PER - ceil_div((ONE - vf) * PER, ONE);
  endfunction

  // Reconstructed phase voltage (in steps) from the gates.
  function automatic int leg_state(input logic hi, input logic lo, input int prev);
    if (hi && !lo) return 1;
    if (lo && !hi) return 0;
    return prev;
  endfunction
  int leg_a_s [P][C], leg_b_s [P][C];

  // Per-period bookkeeping.
  int cur_code [P];      // reference being played this period
  int smp_code [P];      // reference sampled at this period's start
  int lvl_sum [P], gate_sum [P], run_len [P], prev_lvl [P];
  int used_lo = 0, used_hi = 0;
  bit first_period = 1;

  task automatic period_check();
    int e;
    for (int k = 0; k < P; k++) begin
      e = expected_sum(cur_code[k]);
      checks++;
      if (lvl_sum[k] != e) begin
        failures++;
        $display("FAIL phase %0d: level sum %0d expected %0d (code %0d)", k + 1, lvl_sum[k], e, cur_code[k]);
      end
      checks++;
      if (gate_sum[k] - lvl_sum[k] > 4 * DEAD || lvl_sum[k] - gate_sum[k] > 4 * DEAD) begin
        failures++;
        $display("FAIL phase %0d: gate voltage sum %0d vs level sum %0d", k + 1, gate_sum[k], lvl_sum[k]);
      end
    end
  endtask

  // The modulator samples vr at the rising edge that ends a period_start cycle.
  always @(posedge clk) begin
    if (rst_n && period_start) begin
      for (int k = 0; k < P; k++) begin
        smp_code[k] = int'($signed(vr[k]));
        if (smp_code[k] != clamp_code(smp_code[k])) n_sat++;
      end
    end
  end

  // Cycle monitor, sampling at the falling edge. The level seen in cycle c
  // after a period_start (c = 1 .. 5000, the last one being the next
  // period_start cycle) belongs to the sequence of that period.
  int cyc_in_period = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!period_start) cyc_in_period++;
      for (int k = 0; k < P; k++) begin
        int l, g;
        if (gate_a_hi[k] & gate_a_lo[k] || gate_b_hi[k] & gate_b_lo[k]) begin
          failures++;
          $display("FAIL shoot-through phase %0d", k + 1);
        end
        l = int'($signed(level[k]));
        lvl_sum[k] += l;
        if (l < used_lo) used_lo = l;
        if (l > used_hi) used_hi = l;
        if (l != prev_lvl[k]) begin
          if (run_len[k] < DEAD) n_short++;
          if (cyc_in_period != 1 && l != prev_lvl[k] + 1) begin
            failures++;
            $display("FAIL phase %0d level %0d -> %0d inside a period", k + 1, prev_lvl[k], l);
          end
          run_len[k] = 0;
        end
        run_len[k]++;
        prev_lvl[k] = l;
        g = 0;
        for (int c = 0; c < C; c++) begin
          leg_a_s[k][c] = leg_state(gate_a_hi[k][c], gate_a_lo[k][c], leg_a_s[k][c]);
          leg_b_s[k][c] = leg_state(gate_b_hi[k][c], gate_b_lo[k][c], leg_b_s[k][c]);
          g += leg_a_s[k][c] - leg_b_s[k][c];
        end
        gate_sum[k] += g;
      end
      if (period_start) begin
        if (!first_period) begin
          checks++;
          if (cyc_in_period != PER - 1) begin
            failures++;
            $display("FAIL period of %0d cycles", cyc_in_period + 1);
          end
          period_check();
          n_periods++;
        end
        first_period = 0;
        cur_code = smp_code;
        for (int k = 0; k < P; k++) begin
          lvl_sum[k] = 0;
          gate_sum[k] = 0;
        end
        cyc_in_period = 0;
      end
    end
  end

endmodule
