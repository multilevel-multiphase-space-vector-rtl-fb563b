// svpwm_nl -- N-level P-phase space vector modulator.
//
// A multilevel reference is reduced to a two-level problem by a displacement:
// v_r = v_i + v_f with v_i integer and v_f in [0, 1). The switching vectors
// that synthesize v_f in a two-level P-phase modulator, shifted by v_i, are
// switching vectors of the multilevel inverter, with the same times. The
// cost therefore does not depend on the number of levels.
//   ref_decompose  v_r -> v_i, v_f           (stage 1 register)
//   svpwm_2l       v_f -> v_d1..v_d(P+1), t  (stages 2 and 3)
//   vs_adder       v_sj = v_i + v_dj         (stage 4 register)
// v_i is delayed two cycles to meet the two-level results. The split into
// these blocks follows the reference model; the registers are this design's.
//
// Interface: in_valid qualifies vr (P signed fixed-point words, lvl_w(N)
// integer and FRAC_W fraction bits, in voltage steps). Four clock cycles
// later out_valid is high for one cycle with vs[j][k] (signed level of phase k
// in switching vector j, j = 0 .. P) and t[j] (time of vector j in units of
// 2**-FRAC_W of the modulation period). Fully pipelined; synchronous
// active-low reset.
module svpwm_nl
  import svpwm_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned N      = DEF_N,
  parameter int unsigned FRAC_W = DEF_FRAC_W,
  localparam int unsigned LW    = lvl_w(N),
  localparam int unsigned RW    = LW + FRAC_W,
  localparam int unsigned TW    = FRAC_W + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [P-1:0][RW-1:0]       vr,
  output logic                       out_valid,
  output logic [P:0][P-1:0][LW-1:0]  vs,
  output logic [P:0][TW-1:0]         t
);

  // Stage 1: decomposition.
  logic [P-1:0][LW-1:0]     vi_c, vi_q, vi_d1, vi_d2;
  logic [P-1:0][FRAC_W-1:0] vf_c, vf_q;
  logic                     s1_valid;

  ref_decompose #(.P(P), .N(N), .FRAC_W(FRAC_W)) u_dec (.vr(vr), .vi(vi_c), .vf(vf_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      vi_q     <= '0;
      vf_q     <= '0;
      vi_d1    <= '0;
      vi_d2    <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        vi_q <= vi_c;
        vf_q <= vf_c;
      end
      vi_d1 <= vi_q;
      vi_d2 <= vi_d1;
    end
  end

  // Stages 2-3: two-level modulator on the fractional part.
  logic               m_valid;
  logic [P:0][P-1:0]  vd;
  logic [P:0][TW-1:0] t_m;

  svpwm_2l #(.P(P), .FRAC_W(FRAC_W)) u_2l (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .vf(vf_q),
    .out_valid(m_valid), .vd(vd), .t(t_m)
  );

  // Stage 4: shift the displaced vectors back by v_i.
  logic [P:0][P-1:0][LW-1:0] vs_c;

  vs_adder #(.P(P), .N(N)) u_add (.vi(vi_d2), .vd(vd), .vs(vs_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      vs        <= '0;
      t         <= '0;
    end else begin
      out_valid <= m_valid;
      if (m_valid) begin
        vs <= vs_c;
        t  <= t_m;
      end
    end
  end

endmodule
