// time_calc -- switching times of the P+1 vectors of the two-level sequence.
//
// With the sorted fraction vector v-hat (descending), the normalized times are
//   t_1 = 1 - v-hat_1,  t_j = v-hat_(j-1) - v-hat_j (j = 2 .. P),  t_(P+1) = v-hat_P.
// This is done, as in the reference model, by subtracting the vector
// [v-hat ; 0] from [1 ; v-hat]. Because v-hat is sorted every difference is
// non-negative, and the times add up to exactly one period (checked by an
// assertion whenever the input is sorted).
//
// Interface: combinational. val[r]: sorted fractions (FRAC_W bits, unsigned).
// t[j]: time of vector j+1, FRAC_W+1 bits, value t[j] / 2**FRAC_W of the
// modulation period.
module time_calc
  import svpwm_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned FRAC_W = DEF_FRAC_W,
  localparam int unsigned TW    = FRAC_W + 1
) (
  input  logic [P-1:0][FRAC_W-1:0] val,
  output logic [P:0][TW-1:0]       t
);

  localparam logic [TW-1:0] ONE = TW'(1) << FRAC_W;

  logic [P:0][TW-1:0] minuend, subtrahend;

  always_comb begin
    minuend[0]    = ONE;
    subtrahend[P] = '0;
    for (int r = 0; r < P; r++) begin
      minuend[r+1]  = TW'(val[r]);
      subtrahend[r] = TW'(val[r]);
    end
    for (int j = 0; j <= P; j++) t[j] = minuend[j] - subtrahend[j];
  end

  // For a sorted input the times of one period always sum to one.
  logic [TW+$clog2(P+1)-1:0] t_sum;
  logic                      sorted;
  always_comb begin
    t_sum  = '0;
    sorted = 1'b1;
    for (int j = 0; j <= P; j++) t_sum = t_sum + ($bits(t_sum))'(t[j]);
    for (int r = 1; r < P; r++) if (val[r-1] < val[r]) sorted = 1'b0;
    if (sorted)
      assert (t_sum == ($bits(t_sum))'(ONE)) else $error("time_calc: times do not sum to one period");
  end

endmodule
