// vs_adder -- final switching vectors of the multilevel modulator.
//
// Every displaced two-level vector v_dj (components 0 or 1) is shifted back
// by the integer part of the reference: v_sj = v_i + v_dj. The integer part
// is repeated for all P+1 vectors, as the matrix concatenation of the
// reference model does, so the block is P*(P+1) small adders.
//
// Interface: combinational. vi[k]: signed integer part of phase k (lvl_w(N)
// bits). vd[j][k]: 0/1 state of phase k in displaced vector j. vs[j][k]:
// signed level of phase k in switching vector j.
module vs_adder
  import svpwm_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned N   = DEF_N,
  localparam int unsigned LW = lvl_w(N)
) (
  input  logic [P-1:0][LW-1:0]     vi,
  input  logic [P:0][P-1:0]        vd,
  output logic [P:0][P-1:0][LW-1:0] vs
);

  always_comb begin
    for (int j = 0; j <= P; j++)
      for (int k = 0; k < P; k++)
        vs[j][k] = vi[k] + LW'(vd[j][k]);
  end

endmodule
