// fb_trigger_tb -- checks the level-to-cell mapping for five levels and two
// cells per phase. For every level of every phase the cell outputs
// (+1: leg A on and leg B off, -1: leg A off and leg B on, 0: both off) must
// add up to the level, no cell may have both legs on, and a cell that is not
// needed must stay at 0. Also run with seven levels (three cells).
module fb_trigger_tb;
  import svpwm_pkg::*;
  localparam int P = 5;

  int checks = 0, failures = 0;

  logic [P-1:0][lvl_w(5)-1:0] level5;
  logic [P-1:0][1:0]          a5, b5;
  logic [P-1:0][lvl_w(7)-1:0] level7;
  logic [P-1:0][2:0]          a7, b7;

  fb_trigger #(.P(P), .N(5)) dut5 (.level(level5), .leg_a(a5), .leg_b(b5));
  fb_trigger #(.P(P), .N(7)) dut7 (.level(level7), .leg_a(a7), .leg_b(b7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cell_out(input logic a, input logic b);
    return int'(a) - int'(b);
  endfunction

  initial begin
    int sum, used;
    bit ok;
    for (int n = 0; n < 200; n++) begin
      int l5 [P], l7 [P];
      for (int k = 0; k < P; k++) begin
        l5[k] = (n < 5) ? n - 2 : int'($urandom_range(0, 4)) - 2;
        l7[k] = (n < 7) ? n - 3 : int'($urandom_range(0, 6)) - 3;
        level5[k] = lvl_w(5)'(l5[k]);
        level7[k] = lvl_w(7)'(l7[k]);
      end
      #1;
      for (int k = 0; k < P; k++) begin
        ok = 1; sum = 0; used = 0;
        for (int c = 0; c < 2; c++) begin
          if (a5[k][c] && b5[k][c]) ok = 0;
          sum += cell_out(a5[k][c], b5[k][c]);
          if (a5[k][c] || b5[k][c]) used++;
        end
        if (sum != l5[k] || used != (l5[k] < 0 ? -l5[k] : l5[k])) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("FAIL N=5 level %0d a=%b b=%b", l5[k], a5[k], b5[k]); end
        ok = 1; sum = 0; used = 0;
        for (int c = 0; c < 3; c++) begin
          if (a7[k][c] && b7[k][c]) ok = 0;
          sum += cell_out(a7[k][c], b7[k][c]);
          if (a7[k][c] || b7[k][c]) used++;
        end
        if (sum != l7[k] || used != (l7[k] < 0 ? -l7[k] : l7[k])) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("FAIL N=7 level %0d a=%b b=%b", l7[k], a7[k], b7[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
