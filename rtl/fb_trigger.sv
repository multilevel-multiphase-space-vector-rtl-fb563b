// fb_trigger -- turns the output level of every phase into the states of the
// full-bridge cells that produce it in a cascaded full-bridge inverter.
//
// Each phase is a series string of C = (N-1)/2 full-bridge cells, each fed by
// one voltage step V_dc, so the phase can output -C .. +C steps (five levels
// with two cells). A cell gives +V_dc with leg A high and leg B low, -V_dc
// with leg A low and leg B high, and 0 with both legs low. For level n, cells
// 0 .. n-1 give +V_dc when n > 0, cells 0 .. |n|-1 give -V_dc when n < 0, and
// the others give 0: cell 0 is always used first. This fixed assignment of
// levels to cells, and the use of the lower switches for the zero state, are
// this design's choices; the topology and the cell count follow the inverter
// the modulator was built for.
//
// Interface: combinational. level[k]: signed level of phase k (lvl_w(N) bits,
// within -C .. C). leg_a[k][c] / leg_b[k][c]: commanded state of the upper
// switch of leg A / leg B of cell c of phase k (1 = upper on, lower off).
// Dead time is inserted downstream.
module fb_trigger
  import svpwm_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned N   = DEF_N,
  localparam int unsigned LW = lvl_w(N),
  localparam int unsigned C  = max_level(N)
) (
  input  logic [P-1:0][LW-1:0] level,
  output logic [P-1:0][C-1:0]  leg_a,
  output logic [P-1:0][C-1:0]  leg_b
);

  if (N % 2 == 0 || N < 3) begin : g_bad_levels
    $error("fb_trigger: a cascaded full-bridge inverter has an odd number of levels (N >= 3)");
  end

  always_comb begin
    for (int k = 0; k < P; k++) begin
      for (int c = 0; c < C; c++) begin
        leg_a[k][c] = $signed(level[k]) >  $signed(LW'(c));
        leg_b[k][c] = $signed(level[k]) < -$signed(LW'(c));
      end
    end
  end

endmodule
