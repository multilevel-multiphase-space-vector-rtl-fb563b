// ref_decompose_tb -- checks the integer/fraction split of the reference.
// Worked example: v_r = [1.43, 1.13, -0.73, -1.58, -0.25] must give
// v_i = [1, 1, -1, -2, -1] and v_f = [0.43, 0.13, 0.27, 0.42, 0.75]. Then
// random references, including values outside the inverter range, are
// compared with a floor() computed in real arithmetic after clamping.
module ref_decompose_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, F = 12;
  localparam int LW = lvl_w(N), RW = LW + F;

  logic [P-1:0][RW-1:0] vr;
  logic [P-1:0][LW-1:0] vi;
  logic [P-1:0][F-1:0]  vf;
  int checks = 0, failures = 0;

  ref_decompose #(.P(P), .N(N), .FRAC_W(F)) dut (.vr(vr), .vi(vi), .vf(vf));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int code [P]);
    int c, e_i, e_f;
    real x;
    for (int k = 0; k < P; k++) vr[k] = RW'(code[k]);
    #1;
    for (int k = 0; k < P; k++) begin
      c = code[k];
      if (c > 2 * 4096 - 1) c = 2 * 4096 - 1;
      if (c < -2 * 4096)    c = -2 * 4096;
      x   = real'(c) / 4096.0;
      e_i = int'($floor(x));
      e_f = c - e_i * 4096;
      checks++;
      if ($signed(vi[k]) != e_i || int'(vf[k]) != e_f) begin
        failures++;
        $display("FAIL code=%0d vi=%0d vf=%0d expected %0d %0d", code[k], $signed(vi[k]), vf[k], e_i, e_f);
      end
    end
  endtask

  initial begin
    int code [P];
    static int ex_i [P] = '{1, 1, -1, -2, -1};
    static real ex_f [P] = '{0.43, 0.13, 0.27, 0.42, 0.75};
    static real ex_r [P] = '{1.43, 1.13, -0.73, -1.58, -0.25};
    for (int k = 0; k < P; k++) code[k] = int'(ex_r[k] * 4096.0);
    check_one(code);
    for (int k = 0; k < P; k++) begin
      checks++;
      if ($signed(vi[k]) != ex_i[k] || (real'(vf[k]) / 4096.0 - ex_f[k]) > 0.005 ||
          (ex_f[k] - real'(vf[k]) / 4096.0) > 0.005) begin
        failures++;
        $display("FAIL example phase %0d", k);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < P; k++) code[k] = int'($urandom_range(0, 2 * 32768 - 1)) - 32768;
      check_one(code);
    end
    // Edges of the range.
    code = '{8191, 8192, -8192, -8193, 0};
    check_one(code);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
