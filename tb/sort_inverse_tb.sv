// sort_inverse_tb -- checks that row is the inverse of the permutation idx
// for every permutation of five phases (idx[row[k]] == k and
// row[idx[r]] == r), including the worked example idx = [4, 0, 3, 2, 1],
// whose inverse is [1, 4, 3, 2, 0].
module sort_inverse_tb;
  import svpwm_pkg::*;
  localparam int P = 5, IW = idx_w(P);

  logic [P-1:0][IW-1:0] idx, row;
  int checks = 0, failures = 0;

  sort_inverse #(.P(P)) dut (.idx(idx), .row(row));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_perm();
    bit ok = 1;
    for (int k = 0; k < P; k++) begin
      if (int'(row[k]) >= P) ok = 0;
      else if (int'(idx[row[k]]) != k) ok = 0;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL idx=%h row=%h", idx, row);
    end
  endtask

  initial begin
    int perm [P];
    static int exp_row [P] = '{1, 4, 3, 2, 0};
    idx[0] = 4; idx[1] = 0; idx[2] = 3; idx[3] = 2; idx[4] = 1;
    #1;
    check_perm();
    for (int k = 0; k < P; k++) begin
      checks++;
      if (int'(row[k]) != exp_row[k]) begin
        failures++;
        $display("FAIL example row[%0d]=%0d", k, row[k]);
      end
    end
    // All 120 permutations (lexicographic enumeration).
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        for (int c = 0; c < 5; c++)
          for (int d = 0; d < 5; d++)
            for (int e = 0; e < 5; e++) begin
              if (a == b || a == c || a == d || a == e || b == c || b == d ||
                  b == e || c == d || c == e || d == e) continue;
              idx[0] = IW'(a); idx[1] = IW'(b); idx[2] = IW'(c);
              idx[3] = IW'(d); idx[4] = IW'(e);
              #1;
              check_perm();
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
