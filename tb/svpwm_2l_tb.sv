// svpwm_2l_tb -- checks the two-level modulator end to end.
// Fraction vectors are streamed back to back (one per cycle, with gaps); each
// result must appear exactly 2 cycles after its input and satisfy the
// two-level modulation law exactly in fixed point:
//   sum_j t_j = 4096,   sum_j v_dj[k] * t_j = v_f[k] for every phase k,
// with v_d1 = 0, v_d6 = all ones and consecutive vectors adjacent (one phase
// 0 -> 1). Times are unsigned, so these conditions leave no freedom except
// the order among equal fractions. The worked example is also checked
// against its printed vectors and times.
module svpwm_2l_tb;
  import svpwm_pkg::*;
  localparam int P = 5, F = 12, TW = F + 1, LAT = 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [P-1:0][F-1:0] vf;
  logic [P:0][P-1:0]   vd;
  logic [P:0][TW-1:0]  t;
  int checks = 0, failures = 0, cycle = 0;

  svpwm_2l #(.P(P), .FRAC_W(F)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard of inputs with their issue cycle.
  logic [P-1:0][F-1:0] q_vf [$];
  int                  q_cyc [$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      q_vf.push_back(vf);
      q_cyc.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      logic [P-1:0][F-1:0] x;
      int c, sum, acc;
      bit ok;
      if (q_vf.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        x = q_vf.pop_front();
        c = q_cyc.pop_front();
        checks++;
        if (cycle - c != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - c);
        end
        ok = 1;
        sum = 0;
        for (int j = 0; j <= P; j++) sum += int'(t[j]);
        if (sum != 4096) ok = 0;
        for (int k = 0; k < P; k++) begin
          acc = 0;
          for (int j = 0; j <= P; j++) acc += int'(vd[j][k]) * int'(t[j]);
          if (acc != int'(x[k])) ok = 0;
        end
        if (vd[0] != '0 || vd[P] != '1) ok = 0;
        for (int j = 1; j <= P; j++)
          if ((vd[j-1] & ~vd[j]) != '0 || $countones(vd[j] ^ vd[j-1]) != 1) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL vf=%h vd=%b t=%h", x, vd, t);
        end
      end
    end
  end

  initial begin
    static logic [P-1:0] ex_vd [P+1] = '{5'b00000, 5'b10000, 5'b10001, 5'b11001, 5'b11101, 5'b11111};
    static int ex_t [P+1] = '{1024, 1311, 41, 614, 574, 532};
    vf = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Worked example.
    in_valid <= 1;
    vf[0] <= 1761; vf[1] <= 532; vf[2] <= 1106; vf[3] <= 1720; vf[4] <= 3072;
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT) @(posedge clk);
    #1;
    for (int j = 0; j <= P; j++) begin
      checks++;
      if (vd[j] != ex_vd[j] || int'(t[j]) != ex_t[j]) begin
        failures++;
        $display("FAIL example vector %0d: %b t=%0d", j + 1, vd[j], t[j]);
      end
    end
    // Random stream.
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      for (int k = 0; k < P; k++)
        vf[k] <= (n % 3 == 0) ? F'($urandom_range(0, 2)) : F'($urandom);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q_vf.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_vf.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
