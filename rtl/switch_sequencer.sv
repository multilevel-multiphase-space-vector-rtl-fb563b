// switch_sequencer -- plays a switching-vector sequence once per modulation
// period: vector v_s1 for time t_1, then v_s2 for t_2, ..., v_s(P+1) for
// t_(P+1), so that the average output over the period equals the reference.
//
// Timing: one modulation period is PERIOD_CYCLES clock cycles. The times come
// as fractions of the period (2**FRAC_W = whole period), and the sequencer
// converts them without a multiplier: a fractional divider adds 2**FRAC_W to
// an accumulator every cycle and, each time it passes PERIOD_CYCLES,
// subtracts PERIOD_CYCLES and advances the period position pos. pos thus
// runs 0 .. 2**FRAC_W-1 exactly once per period, pos = floor(c * 2**FRAC_W /
// PERIOD_CYCLES) in cycle c. When a sequence is loaded, the running sums
// end_j = t_1 + ... + t_j are formed; the active vector is the number of end
// values already reached by pos, so vectors of zero time are never output.
// Vector j+1 (1-based) is therefore on during the cycles c with
// ceil(end_j * PERIOD_CYCLES / 2**FRAC_W) <= c < ceil(end_(j+1) * PERIOD_CYCLES / 2**FRAC_W).
//
// A sequence offered with seq_valid is kept in a shadow register and becomes
// active at the start of the next period; until the first one arrives, and
// after reset, every phase outputs level 0. period_start pulses in the first
// cycle of each period (the cycle in which pos = 0), including the first
// cycle after reset (it is held high during reset); level and vec_idx are
// registered and show the vector of that position one cycle later.
// Playing the vectors in the order 1 .. P+1 in each period follows the
// algorithm's sequence; the conversion of times to cycles is this design's.
module switch_sequencer
  import svpwm_pkg::*;
#(
  parameter int unsigned P             = DEF_P,
  parameter int unsigned N             = DEF_N,
  parameter int unsigned FRAC_W        = DEF_FRAC_W,
  parameter int unsigned PERIOD_CYCLES = 5000,
  localparam int unsigned LW           = lvl_w(N),
  localparam int unsigned TW           = FRAC_W + 1,
  localparam int unsigned JW           = $clog2(P + 1),
  localparam int unsigned CW           = $clog2(PERIOD_CYCLES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       seq_valid,
  input  logic [P:0][P-1:0][LW-1:0]  vs,
  input  logic [P:0][TW-1:0]         t,
  output logic                       period_start,
  output logic [P-1:0][LW-1:0]       level,
  output logic [JW-1:0]              vec_idx
);

  if ((1 << FRAC_W) > PERIOD_CYCLES) begin : g_bad_period
    $error("switch_sequencer: PERIOD_CYCLES must be at least 2**FRAC_W");
  end

  typedef logic [P:0][P-1:0][LW-1:0] seq_t;
  typedef logic [P-1:0][TW-1:0]      ends_t;   // end_1 .. end_P

  // Running sums of the times of a new sequence.
  ends_t ends_c;
  always_comb begin
    logic [TW-1:0] acc;
    acc = '0;
    for (int j = 0; j < P; j++) begin
      acc       = acc + t[j];
      ends_c[j] = acc;
    end
  end

  seq_t  shadow_vs, active_vs;
  ends_t shadow_end, active_end;

  // Period counter and fractional divider.
  logic [CW-1:0] cyc;
  logic [CW:0]   frac_acc;
  logic [FRAC_W-1:0] pos;
  logic          last_cycle;
  logic [CW:0]   frac_sum;

  assign last_cycle = (cyc == CW'(PERIOD_CYCLES - 1));
  assign frac_sum   = frac_acc + (CW+1)'(1 << FRAC_W);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc      <= '0;
      frac_acc <= '0;
      pos      <= '0;
    end else if (last_cycle) begin
      cyc      <= '0;
      frac_acc <= '0;
      pos      <= '0;
    end else begin
      cyc <= cyc + 1'b1;
      if (frac_sum >= (CW+1)'(PERIOD_CYCLES)) begin
        frac_acc <= frac_sum - (CW+1)'(PERIOD_CYCLES);
        pos      <= pos + 1'b1;
      end else begin
        frac_acc <= frac_sum;
      end
    end
  end

  // Shadow and active sequence registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shadow_vs  <= '0;
      shadow_end <= {P{TW'(1) << FRAC_W}};
      active_vs  <= '0;
      active_end <= {P{TW'(1) << FRAC_W}};
    end else begin
      if (seq_valid) begin
        shadow_vs  <= vs;
        shadow_end <= ends_c;
      end
      if (last_cycle) begin
        active_vs  <= seq_valid ? vs     : shadow_vs;
        active_end <= seq_valid ? ends_c : shadow_end;
      end
    end
  end

  // Vector index: how many end points the period position has reached.
  logic [JW-1:0] sel;
  always_comb begin
    sel = '0;
    for (int j = 0; j < P; j++)
      if (TW'(pos) >= active_end[j]) sel = sel + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period_start <= 1'b1;
      level        <= '0;
      vec_idx      <= '0;
    end else begin
      period_start <= last_cycle;
      level        <= active_vs[sel];
      vec_idx      <= sel;
    end
  end

endmodule
