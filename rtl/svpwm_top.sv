// svpwm_top -- multilevel multiphase space vector PWM modulator for a
// cascaded full-bridge inverter (default: five phases, five levels, 10 kHz).
//
// Data flow, once per modulation period of PERIOD_CYCLES = CLK_HZ / FSW_HZ
// clock cycles:
//   1. In the first cycle of a period (period_start) the normalized reference
//      vr, supplied by an external controller, is sampled into svpwm_nl.
//   2. svpwm_nl computes the P+1 switching vectors and their times
//      (4-cycle pipeline); switch_sequencer keeps them in its shadow register.
//   3. At the next period boundary the sequence becomes active and is played
//      vector by vector, each for its time, as per-phase output levels.
//   4. fb_trigger maps each phase level onto the C = (N-1)/2 full-bridge
//      cells of the phase, and one dead_time block per leg makes the
//      complementary gate signals.
// A reference sampled in period n is therefore output during period n+1.
// The modulator, its decomposition and the two-level sorting scheme follow
// the published algorithm; the fixed-point formats, the clock rate, the
// sampling scheme, the cell assignment and the dead time are this design's
// choices.
//
// Interface:
//   vr[k]          normalized reference of phase k: signed, lvl_w(N) integer
//                  and FRAC_W fraction bits, in units of the voltage step
//                  V_dc (the controller divides by V_dc); saturated to the
//                  inverter's range.
//   gate_*[k][c]   gate drive of cell c of phase k: leg A / leg B, upper (hi)
//                  or lower (lo) switch, 1 = on.
//   level[k]       level currently commanded for phase k (before dead time).
//   vec_idx        index (0 .. P) of the switching vector being output.
//   period_start   one-cycle pulse at the start of every modulation period.
// Synchronous active-low reset. The first period starts in the first cycle
// after reset; during it all gates are off for DEAD_CYCLES cycles and every
// phase is then held at level 0, and the reference sampled at its start is
// output in the second period.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int unsigned P           = DEF_P,
  parameter int unsigned N           = DEF_N,
  parameter int unsigned FRAC_W      = DEF_FRAC_W,
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned FSW_HZ      = 10_000,
  parameter int unsigned DEAD_CYCLES = 50,
  localparam int unsigned LW         = lvl_w(N),
  localparam int unsigned RW         = LW + FRAC_W,
  localparam int unsigned C          = max_level(N),
  localparam int unsigned TW         = FRAC_W + 1,
  localparam int unsigned PERIOD     = CLK_HZ / FSW_HZ
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [P-1:0][RW-1:0]  vr,
  output logic [P-1:0][C-1:0]   gate_a_hi,
  output logic [P-1:0][C-1:0]   gate_a_lo,
  output logic [P-1:0][C-1:0]   gate_b_hi,
  output logic [P-1:0][C-1:0]   gate_b_lo,
  output logic [P-1:0][LW-1:0]  level,
  output logic [$clog2(P+1)-1:0] vec_idx,
  output logic                  period_start
);

  // Modulator, started once per period.
  logic                      seq_valid;
  logic [P:0][P-1:0][LW-1:0] vs;
  logic [P:0][TW-1:0]        t;

  svpwm_nl #(.P(P), .N(N), .FRAC_W(FRAC_W)) u_mod (
    .clk(clk), .rst_n(rst_n), .in_valid(period_start), .vr(vr),
    .out_valid(seq_valid), .vs(vs), .t(t)
  );

  // Sequence playback.
  switch_sequencer #(
    .P(P), .N(N), .FRAC_W(FRAC_W), .PERIOD_CYCLES(PERIOD)
  ) u_seq (
    .clk(clk), .rst_n(rst_n), .seq_valid(seq_valid), .vs(vs), .t(t),
    .period_start(period_start), .level(level), .vec_idx(vec_idx)
  );

  // Level to full-bridge leg commands.
  logic [P-1:0][C-1:0] leg_a, leg_b;

  fb_trigger #(.P(P), .N(N)) u_trig (.level(level), .leg_a(leg_a), .leg_b(leg_b));

  // Dead time on every leg.
  for (genvar k = 0; k < P; k++) begin : g_phase
    for (genvar c = 0; c < C; c++) begin : g_cell
      dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_dt_a (
        .clk(clk), .rst_n(rst_n), .cmd(leg_a[k][c]),
        .gate_hi(gate_a_hi[k][c]), .gate_lo(gate_a_lo[k][c])
      );
      dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_dt_b (
        .clk(clk), .rst_n(rst_n), .cmd(leg_b[k][c]),
        .gate_hi(gate_b_hi[k][c]), .gate_lo(gate_b_lo[k][c])
      );
    end
  end

endmodule
