// vs_adder_tb -- checks v_s = v_i + v_d. Worked example: v_i =
// [1, 1, -1, -2, -1] with the displaced vectors of the example gives
// v_s1 = [1, 1, -1, -2, -1] ... v_s6 = [2, 2, 0, -1, 0]. Random integer parts
// and 0/1 vectors are compared with sums formed in the testbench.
module vs_adder_tb;
  import svpwm_pkg::*;
  localparam int P = 5, N = 5, LW = lvl_w(N);

  logic [P-1:0][LW-1:0]      vi;
  logic [P:0][P-1:0]         vd;
  logic [P:0][P-1:0][LW-1:0] vs;
  int checks = 0, failures = 0;

  vs_adder #(.P(P), .N(N)) dut (.vi(vi), .vd(vd), .vs(vs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ex_vi [P] = '{1, 1, -1, -2, -1};
    static int ex_vs [P+1][P] = '{'{1, 1, -1, -2, -1}, '{1, 1, -1, -2, 0}, '{2, 1, -1, -2, 0},
                           '{2, 1, -1, -1, 0}, '{2, 1, 0, -1, 0}, '{2, 2, 0, -1, 0}};
    static logic [P-1:0] ex_vd [P+1] = '{5'b00000, 5'b10000, 5'b10001, 5'b11001, 5'b11101, 5'b11111};
    int e;
    for (int k = 0; k < P; k++) vi[k] = LW'(ex_vi[k]);
    for (int j = 0; j <= P; j++) vd[j] = ex_vd[j];
    #1;
    for (int j = 0; j <= P; j++)
      for (int k = 0; k < P; k++) begin
        checks++;
        if ($signed(vs[j][k]) != ex_vs[j][k]) begin
          failures++;
          $display("FAIL example v_s%0d phase %0d = %0d", j + 1, k + 1, $signed(vs[j][k]));
        end
      end
    for (int n = 0; n < 2000; n++) begin
      int r [P];
      for (int k = 0; k < P; k++) begin
        r[k] = int'($urandom_range(0, 3)) - 2;
        vi[k] = LW'(r[k]);
      end
      for (int j = 0; j <= P; j++) vd[j] = P'($urandom);
      #1;
      for (int j = 0; j <= P; j++)
        for (int k = 0; k < P; k++) begin
          e = r[k] + int'(vd[j][k]);
          checks++;
          if ($signed(vs[j][k]) != e) begin
            failures++;
            $display("FAIL vs[%0d][%0d]=%0d expected %0d", j, k, $signed(vs[j][k]), e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
