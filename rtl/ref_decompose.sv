// ref_decompose -- splits the normalized reference vector into its integer
// part v_i = integ(v_r) and its fractional part v_f = v_r - v_i.
//
// The reference is a fixed-point number, so the split costs no arithmetic:
// integ() rounds toward minus infinity (so -0.73 gives -1 and 0.27), which is
// an arithmetic right shift by FRAC_W, and v_f is simply the FRAC_W fraction
// bits. Every v_f component therefore lies in [0, 1), as the two-level
// modulator requires.
//
// Before the split each component is saturated to the range the inverter can
// synthesize, [-(N-1)/2, (N-1)/2 - 2**-FRAC_W], so that v_i + 1 never exceeds
// the highest level. The saturation is this design's addition; the algorithm
// assumes the reference is inside the inverter's range.
//
// Interface: purely combinational. vr[k] is the normalized reference of
// phase k (lvl_w(N) integer bits, FRAC_W fraction bits, two's complement).
// vi[k] is signed with lvl_w(N) bits, vf[k] unsigned with FRAC_W bits.
module ref_decompose
  import svpwm_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned N      = DEF_N,
  parameter int unsigned FRAC_W = DEF_FRAC_W,
  localparam int unsigned LW    = lvl_w(N),
  localparam int unsigned RW    = LW + FRAC_W
) (
  input  logic [P-1:0][RW-1:0]     vr,
  output logic [P-1:0][LW-1:0]     vi,
  output logic [P-1:0][FRAC_W-1:0] vf
);

  localparam logic signed [RW-1:0] VR_MAX =
    RW'(signed'((max_level(N) << FRAC_W) - 1));
  localparam logic signed [RW-1:0] VR_MIN =
    RW'(-signed'(max_level(N) << FRAC_W));

  logic signed [RW-1:0] vr_sat [P];

  always_comb begin
    for (int k = 0; k < P; k++) begin
      if ($signed(vr[k]) > VR_MAX)      vr_sat[k] = VR_MAX;
      else if ($signed(vr[k]) < VR_MIN) vr_sat[k] = VR_MIN;
      else                              vr_sat[k] = $signed(vr[k]);
      vi[k] = vr_sat[k][RW-1:FRAC_W];
      vf[k] = vr_sat[k][FRAC_W-1:0];
    end
  end

endmodule
