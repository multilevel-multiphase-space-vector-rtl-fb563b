// dead_time_tb -- checks one leg's gate signals against a cycle model.
// With DEAD_CYCLES = 4 a random command (long steady stretches and short
// pulses) is applied. The model: in the edge after the command differs from
// the leg state, both gates switch off and the state follows the command;
// the new gate turns on DEAD_CYCLES cycles after that. Besides the exact
// comparison, the testbench checks that hi and lo are never on together,
// that every off gap lasts at least DEAD_CYCLES cycles, and that pulses
// shorter than the dead time were absorbed at least once.
module dead_time_tb;
  localparam int D = 4;

  logic clk = 0, rst_n = 0, cmd = 0, gate_hi, gate_lo;
  int checks = 0, failures = 0, n_absorbed = 0;

  dead_time #(.DEAD_CYCLES(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, updated at the same edges.
  int m_state, m_since, gap;
  logic m_hi, m_lo;

  always @(posedge clk) begin
    if (!rst_n) begin
      m_state <= 0; m_since <= 1; m_hi <= 0; m_lo <= 0;
    end else if (int'(cmd) != m_state) begin
      m_state <= int'(cmd); m_since <= 1; m_hi <= 0; m_lo <= 0;
      if (m_since < D) n_absorbed++;
    end else begin
      m_since <= m_since + 1;
      m_hi <= (m_since >= D && m_state == 1);
      m_lo <= (m_since >= D && m_state == 0);
    end
  end

  initial begin
    m_since = 0;
    gap = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (gate_hi !== m_hi || gate_lo !== m_lo || (gate_hi && gate_lo)) begin
        failures++;
        $display("FAIL cycle %0d: hi=%b lo=%b expected %b %b", n, gate_hi, gate_lo, m_hi, m_lo);
      end
      if (!gate_hi && !gate_lo) gap++;
      else begin
        if (gap != 0 && gap < D) begin
          failures++;
          $display("FAIL dead gap of %0d cycles", gap);
        end
        gap = 0;
      end
      if ((n / 64) % 2 == 0) begin
        if ($urandom_range(0, 15) == 0) cmd = !cmd;     // slow changes
      end else begin
        if ($urandom_range(0, 2) == 0) cmd = !cmd;      // short pulses
      end
    end
    checks++;
    if (n_absorbed == 0) begin
      failures++;
      $display("FAIL no pulse shorter than the dead time was applied");
    end
    $display("absorbed short pulses: %0d", n_absorbed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
