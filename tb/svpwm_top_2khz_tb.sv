// svpwm_top_2khz_tb -- the modulator at a 2 kHz switching frequency (25000
// clock cycles per period at 50 MHz) driven for two 50 Hz cycles (80
// periods) by an unbalanced five-phase reference with a fifth harmonic. The
// phase amplitudes (0.9, 1.9, 1.1, 1.5 and 0.7 voltage steps) and the
// fifth-harmonic amplitude (0.1 step) are this testbench's choice. The shared
// checker verifies every period (exact volt-second balance of the commanded
// levels, rising-only levels within a period, gate voltages, no
// shoot-through); the testbench also requires all 80 periods to be checked
// and the strongest phase to reach the outer levels.
module svpwm_top_2khz_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, F = 12, LW = lvl_w(N), RW = LW + F, C = 2;
  localparam int FSW = 2000, PER = 50_000_000 / FSW, DEAD = 50;

  logic clk = 0, rst_n = 0;
  logic [P-1:0][RW-1:0] vr;
  logic [P-1:0][C-1:0]  gate_a_hi, gate_a_lo, gate_b_hi, gate_b_lo;
  logic [P-1:0][LW-1:0] level;
  logic [2:0]           vec_idx;
  logic                 period_start;
  int checks = 0, failures = 0;

  svpwm_top #(.FSW_HZ(FSW)) dut (.*);
  svpwm_top_checker #(.P(P), .N(N), .F(F), .PER(PER), .DEAD(DEAD)) u_chk (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (PER * 90) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end

  initial begin
    static real amp [P] = '{0.9, 1.9, 1.1, 1.5, 0.7};
    real ph, v;
    vr = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      @(negedge clk);
      while (!period_start) @(negedge clk);
      for (int k = 0; k < P; k++) begin
        ph = 2.0 * 3.14159265358979 * (real'(n) / 40.0 + real'(k) / real'(P));
        v = amp[k] * $sin(ph) + 0.1 * $sin(5.0 * ph);
        vr[k] = RW'(int'($floor(v * 4096.0 + 0.5)));
      end
    end
    vr = '0;
    repeat (2) begin
      @(negedge clk);
      while (!period_start) @(negedge clk);
    end
    $display("periods checked %0d, levels %0d..%0d, saturated %0d",
             u_chk.n_periods, u_chk.used_lo, u_chk.used_hi, u_chk.n_sat);
    checks++;
    if (u_chk.n_periods < 80 || u_chk.used_lo != -2 || u_chk.used_hi != 2) begin
      failures++;
      $display("FAIL periods or level range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end
endmodule
