// row_selector_tb -- checks the coefficient matrix D built from the
// triangular matrix. Worked example: rows [1, 4, 3, 2, 0] give the switching
// vectors v_d1 .. v_d6 = 00000, 00001, 10001, 10011, 10111, 11111 (phase 1
// first). For every permutation the sequence must start at all zeros, end at
// all ones, and each vector must differ from the previous one by exactly one
// phase going from 0 to 1, the r-th change being the phase of row r.
module row_selector_tb;
  import svpwm_pkg::*;
  localparam int P = 5, IW = idx_w(P);

  logic [P-1:0][IW-1:0] row;
  logic [P:0][P-1:0]    vd;
  int checks = 0, failures = 0;

  row_selector #(.P(P)) dut (.row(row), .vd(vd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seq();
    bit ok = 1;
    logic [P-1:0] diff;
    if (vd[0] != '0 || vd[P] != '1) ok = 0;
    for (int j = 1; j <= P; j++) begin
      diff = vd[j] ^ vd[j-1];
      if ((vd[j-1] & ~vd[j]) != '0) ok = 0;        // only 0 -> 1 changes
      if ($countones(diff) != 1) ok = 0;           // adjacent vectors
      for (int k = 0; k < P; k++)                  // phase of row j-1 switches
        if (diff[k] && int'(row[k]) != j - 1) ok = 0;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL row=%h vd=%b", row, vd);
    end
  endtask

  initial begin
    // Phase 1 is bit 0: vector 00001 (phase 5 high) is 5'b10000.
    static logic [P-1:0] exp_vd [P+1] = '{5'b00000, 5'b10000, 5'b10001, 5'b11001, 5'b11101, 5'b11111};
    row[0] = 1; row[1] = 4; row[2] = 3; row[3] = 2; row[4] = 0;
    #1;
    check_seq();
    for (int j = 0; j <= P; j++) begin
      checks++;
      if (vd[j] != exp_vd[j]) begin
        failures++;
        $display("FAIL example v_d%0d=%b expected %b", j + 1, vd[j], exp_vd[j]);
      end
    end
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        for (int c = 0; c < 5; c++)
          for (int d = 0; d < 5; d++)
            for (int e = 0; e < 5; e++) begin
              if (a == b || a == c || a == d || a == e || b == c || b == d ||
                  b == e || c == d || c == e || d == e) continue;
              row[0] = IW'(a); row[1] = IW'(b); row[2] = IW'(c);
              row[3] = IW'(d); row[4] = IW'(e);
              #1;
              check_seq();
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
