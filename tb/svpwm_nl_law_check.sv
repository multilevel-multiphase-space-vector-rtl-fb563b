// svpwm_nl_law_check -- drives one svpwm_nl instance of a given size with
// random references over the inverter range (plus some beyond it) and checks
// every result against the modulation law, exactly in fixed point:
//   sum_j t_j = 2**F,   sum_j v_sj[k] * t_j = clamp(v_r[k]),
// levels within -(N-1)/2 .. (N-1)/2, consecutive vectors one step apart in
// exactly one phase, and a 4-cycle latency. Reports its counts on its ports
// and raises done when its COUNT inputs have been issued and drained.
module svpwm_nl_law_check
  import svpwm_pkg::*;
#(
  parameter int P     = 5,
  parameter int N     = 5,
  parameter int F     = 12,
  parameter int COUNT = 2000,
  localparam int LW   = lvl_w(N),
  localparam int RW   = LW + F,
  localparam int TW   = F + 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int ONE  = 1 << F;
  localparam int LMAX = (N - 1) / 2;
  localparam int VMAX = LMAX * ONE - 1;
  localparam int VMIN = -LMAX * ONE;

  logic                      in_valid, out_valid;
  logic [P-1:0][RW-1:0]      vr;
  logic [P:0][P-1:0][LW-1:0] vs;
  logic [P:0][TW-1:0]        t;
  int cycle, issued;

  svpwm_nl #(.P(P), .N(N), .FRAC_W(F)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .vr(vr),
    .out_valid(out_valid), .vs(vs), .t(t)
  );

  logic [P-1:0][RW-1:0] q_vr [$];
  int                   q_cyc [$];

  initial begin
    checks = 0; failures = 0; cycle = 0; issued = 0; done = 0;
    in_valid = 0; vr = '0;
  end

  // Stimulus, changed at the falling edge.
  always @(negedge clk) begin
    if (rst_n && issued < COUNT) begin
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < P; k++) begin
        int r;
        r = (issued % 8 == 0) ? int'($urandom_range(0, 3 * ONE * LMAX)) - (3 * ONE * LMAX) / 2
                              : int'($urandom_range(0, 2 * ONE * LMAX - 1)) - ONE * LMAX;
        vr[k] = RW'(r);
      end
      if (in_valid) issued++;
    end else begin
      in_valid = 0;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      q_vr.push_back(vr);
      q_cyc.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      logic [P-1:0][RW-1:0] x;
      int c, sum, acc, ref_k, lv, dsum;
      bit ok;
      if (q_vr.size() == 0) begin
        failures++;
        $display("FAIL P=%0d N=%0d: output without input", P, N);
      end else begin
        x = q_vr.pop_front();
        c = q_cyc.pop_front();
        ok = (cycle - c == 4);
        sum = 0;
        for (int j = 0; j <= P; j++) sum += int'(t[j]);
        if (sum != ONE) ok = 0;
        for (int k = 0; k < P; k++) begin
          ref_k = int'($signed(x[k]));
          if (ref_k > VMAX) ref_k = VMAX;
          if (ref_k < VMIN) ref_k = VMIN;
          acc = 0;
          for (int j = 0; j <= P; j++) begin
            lv = int'($signed(vs[j][k]));
            if (lv < -LMAX || lv > LMAX) ok = 0;
            acc += lv * int'(t[j]);
          end
          if (acc != ref_k) ok = 0;
        end
        for (int j = 1; j <= P; j++) begin
          dsum = 0;
          for (int k = 0; k < P; k++) begin
            lv = int'($signed(vs[j][k])) - int'($signed(vs[j-1][k]));
            if (lv < 0 || lv > 1) ok = 0;
            dsum += lv;
          end
          if (dsum != 1) ok = 0;
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL P=%0d N=%0d: vr=%h", P, N, x);
        end
      end
    end
    if (rst_n && issued >= COUNT && q_vr.size() == 0 && !in_valid) done <= 1;
  end

endmodule
