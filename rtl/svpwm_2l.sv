// svpwm_2l -- two-level P-phase space vector modulator.
//
// Input is the fractional reference v_f (every component in [0, 1)). The
// modulator finds P+1 switching vectors with 0/1 components and their times
// so that sum(t_j) = 1 and sum(v_dj * t_j) = v_f, each vector differing from
// the next in one phase only. It works without matrices:
//   1. sorter        sorts v_f descending and records the permutation Idx;
//   2. time_calc     takes differences of neighbouring sorted values -> t;
//   3. sort_inverse  turns Idx into the D-hat row of every phase;
//   4. row_selector  picks those rows of the triangular matrix -> v_d1..v_d(P+1).
// The structure follows the reference hardware model; the pipeline is this
// design's choice: the sort result is registered (stage 1), the times and
// vectors are registered at the output (stage 2).
//
// Interface: in_valid qualifies vf; out_valid follows it 2 clock cycles later
// together with vd and t. A new input may be given every cycle. Synchronous,
// active-low reset clears the valid flags and the outputs.
module svpwm_2l
  import svpwm_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned FRAC_W = DEF_FRAC_W,
  localparam int unsigned IW    = idx_w(P),
  localparam int unsigned TW    = FRAC_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [P-1:0][FRAC_W-1:0] vf,
  output logic                     out_valid,
  output logic [P:0][P-1:0]        vd,
  output logic [P:0][TW-1:0]       t
);

  // Stage 1: sort.
  logic [P-1:0][FRAC_W-1:0] val_c, val_q;
  logic [P-1:0][IW-1:0]     idx_c, idx_q;
  logic                     s1_valid;

  sorter #(.P(P), .FRAC_W(FRAC_W)) u_sort (.vf(vf), .val(val_c), .idx(idx_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      val_q    <= '0;
      idx_q    <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        val_q <= val_c;
        idx_q <= idx_c;
      end
    end
  end

  // Stage 2: times, inverse permutation, selection of D-hat rows.
  logic [P-1:0][IW-1:0] row_c;
  logic [P:0][P-1:0]    vd_c;
  logic [P:0][TW-1:0]   t_c;

  time_calc    #(.P(P), .FRAC_W(FRAC_W)) u_time (.val(val_q), .t(t_c));
  sort_inverse #(.P(P))                  u_inv  (.idx(idx_q), .row(row_c));
  row_selector #(.P(P))                  u_sel  (.row(row_c), .vd(vd_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      vd        <= '0;
      t         <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        vd <= vd_c;
        t  <= t_c;
      end
    end
  end

endmodule
