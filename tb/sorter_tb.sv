// sorter_tb -- checks the descending sort and its index vector.
// The worked example v_f = [0.43, 0.13, 0.27, 0.42, 0.75] must sort to
// [0.75, 0.43, 0.42, 0.27, 0.13] with phases [5, 1, 4, 3, 2] (1-based).
// Random vectors, many with repeated values, are checked for: descending
// order, val[r] being the input of phase idx[r], idx being a permutation and
// equal values keeping ascending phase order.
module sorter_tb;
  import svpwm_pkg::*;
  localparam int P = 5, F = 12, IW = idx_w(P);

  logic [P-1:0][F-1:0]  vf, val;
  logic [P-1:0][IW-1:0] idx;
  int checks = 0, failures = 0;

  sorter #(.P(P), .FRAC_W(F)) dut (.vf(vf), .val(val), .idx(idx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_props();
    bit seen [P];
    bit ok;
    ok = 1;
    foreach (seen[k]) seen[k] = 0;
    for (int r = 0; r < P; r++) begin
      if (int'(idx[r]) >= P) ok = 0;
      else begin
        if (seen[idx[r]]) ok = 0;
        seen[idx[r]] = 1;
        if (val[r] != vf[idx[r]]) ok = 0;
      end
      if (r > 0) begin
        if (val[r-1] < val[r]) ok = 0;
        if (val[r-1] == val[r] && idx[r-1] > idx[r]) ok = 0;
      end
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL vf=%h val=%h idx=%h", vf, val, idx);
    end
  endtask

  initial begin
    static int exp_idx [P] = '{4, 0, 3, 2, 1};
    static int exp_val [P] = '{3072, 1761, 1720, 1106, 532};
    vf = '0;
    vf[0] = 1761; vf[1] = 532; vf[2] = 1106; vf[3] = 1720; vf[4] = 3072;
    #1;
    check_props();
    for (int r = 0; r < P; r++) begin
      checks++;
      if (int'(idx[r]) != exp_idx[r] || int'(val[r]) != exp_val[r]) begin
        failures++;
        $display("FAIL example position %0d: idx=%0d val=%0d", r, idx[r], val[r]);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < P; k++)
        vf[k] = (n % 2) ? F'($urandom_range(0, 3)) : F'($urandom);
      #1;
      check_props();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
