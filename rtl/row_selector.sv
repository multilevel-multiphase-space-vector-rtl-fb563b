// row_selector -- builds the two-level coefficient matrix D and hands out its
// columns as the displaced switching vectors v_d1 .. v_d(P+1).
//
// D-hat is the upper triangular matrix of the algorithm without its constant
// first row: P rows by P+1 columns, row r holding ones in every column after
// column r. Row r belongs to the r-th largest fractional component. Phase k
// takes row row[k] of D-hat (the inverse permutation), which is exactly
// D = P^T * D-hat. Column j of D is then switching vector j: consecutive
// columns differ in one phase only, so the sequence is adjacent.
// D-hat is a constant, generated by svpwm_pkg::triu_entry, so the selector
// reduces to P+1 comparisons per phase.
//
// Interface: combinational. row[k]: D-hat row of phase k (0 .. P-1).
// vd[j][k]: two-level state (0/1) of phase k in displaced vector j, j = 0 .. P.
module row_selector
  import svpwm_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  localparam int unsigned IW = idx_w(P)
) (
  input  logic [P-1:0][IW-1:0] row,
  output logic [P:0][P-1:0]    vd
);

  // Triangular matrix D-hat (P rows, P+1 columns).
  localparam int unsigned NCOL = P + 1;
  typedef logic [NCOL-1:0] dhat_row_t;

  function automatic dhat_row_t dhat_row(input int unsigned r);
    dhat_row_t v;
    for (int unsigned c = 0; c < NCOL; c++) v[c] = triu_entry(r, c);
    return v;
  endfunction

  dhat_row_t dhat [P];

  always_comb begin
    for (int r = 0; r < P; r++) dhat[r] = dhat_row(r);
  end

  // Selector: row k of D is row row[k] of D-hat.
  always_comb begin
    for (int k = 0; k < P; k++) begin
      for (int j = 0; j <= P; j++)
        vd[j][k] = dhat[row[k]][j];
    end
  end

endmodule
