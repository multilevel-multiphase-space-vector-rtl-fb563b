// svpwm_nl_generic_tb -- the N-level modulator at sizes other than the
// default: three phases with three levels, seven phases with nine levels,
// and six phases with seven levels and 10 fraction bits. Each instance is
// driven and checked against the exact modulation law by
// svpwm_nl_law_check; all must finish with no failure.
module svpwm_nl_generic_tb;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  always #5 clk = ~clk;

  svpwm_nl_law_check #(.P(3), .N(3), .F(12)) u_p3n3 (.clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .done(d0));
  svpwm_nl_law_check #(.P(7), .N(9), .F(12)) u_p7n9 (.clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .done(d1));
  svpwm_nl_law_check #(.P(6), .N(7), .F(10)) u_p6n7 (.clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d0 && d1 && d2);
    @(posedge clk);
    $display("checked: P3/N3 %0d, P7/N9 %0d, P6/N7 %0d", c0, c1, c2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2,
             f0 + f1 + f2 + ((c0 == 0 || c1 == 0 || c2 == 0) ? 1 : 0));
    $finish;
  end
endmodule
