// dead_time -- gate signals of one inverter leg with a dead time.
//
// The leg's command cmd selects the upper (1) or the lower (0) switch. The
// two gate outputs are complementary, except that after every change of the
// command both stay off for DEAD_CYCLES clock cycles so that the two switches
// of the leg never conduct together. A command pulse shorter than the dead
// time is absorbed (the leg returns to its previous switch after a new dead
// time), which is how short switching pulses are lost in practice. The dead
// time value is this design's choice.
//
// Interface: cmd is sampled every clock. gate_hi / gate_lo are registered and
// react in the clock edge after cmd changes: both go off at that edge, and
// the new switch turns on DEAD_CYCLES cycles later. After reset both are off
// for DEAD_CYCLES cycles, then the lower switch is on. Synchronous active-low
// reset.
module dead_time #(
  parameter int unsigned DEAD_CYCLES = 50,
  localparam int unsigned DW         = $clog2(DEAD_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd,
  output logic gate_hi,
  output logic gate_lo
);

  if (DEAD_CYCLES < 1) begin : g_bad_dead
    $error("dead_time: DEAD_CYCLES must be at least 1");
  end

  logic          state;
  logic [DW-1:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= 1'b0;
      wait_cnt <= DW'(DEAD_CYCLES - 1);
      gate_hi  <= 1'b0;
      gate_lo  <= 1'b0;
    end else begin
      if (cmd != state) begin
        state    <= cmd;
        wait_cnt <= DW'(DEAD_CYCLES - 1);
        gate_hi  <= 1'b0;
        gate_lo  <= 1'b0;
      end else if (wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 1'b1;
        gate_hi  <= 1'b0;
        gate_lo  <= 1'b0;
      end else begin
        gate_hi  <= state;
        gate_lo  <= !state;
      end
    end
  end

  // The two switches of a leg are never on together.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(gate_hi && gate_lo)) else $error("dead_time: shoot-through");
  end

endmodule
