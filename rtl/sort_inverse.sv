// sort_inverse -- inverts the permutation produced by the sorter.
//
// idx[r] names the phase placed at sorted position r; this block returns, for
// every phase k, the position row[k] it was sorted to. That position is the
// row of the triangular matrix D-hat the phase takes in the coefficient
// matrix D = P^T * D-hat, so it replaces the multiplication by the transposed
// permutation matrix. It is done by "sorting the indices": each phase looks
// for the position that holds its own number.
//
// Interface: combinational. idx: a permutation of 0 .. P-1. row[k]: its
// inverse.
module sort_inverse
  import svpwm_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  localparam int unsigned IW = idx_w(P)
) (
  input  logic [P-1:0][IW-1:0] idx,
  output logic [P-1:0][IW-1:0] row
);

  always_comb begin
    for (int k = 0; k < P; k++) begin
      row[k] = '0;
      for (int r = 0; r < P; r++) begin
        if (idx[r] == IW'(k))
          row[k] = row[k] | IW'(r);
      end
    end
  end

endmodule
