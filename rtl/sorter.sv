// sorter -- sorts the P fractional reference components in descending order
// and reports the permutation it applied.
//
// This replaces the permutation matrix P of the algorithm: val is the sorted
// vector v-hat_f and idx[r] is the phase whose component landed in position r
// (the "Idx" output of the sort step). The sort is a parallel rank sort:
// every component is compared with every other one, its rank is the number
// of components that must precede it (larger ones, and equal ones of a lower
// phase index, so ties keep phase order), and each output position then
// picks the component of that rank. It takes P*(P-1) comparators and no
// clock; the choice of sorting method is this design's own.
//
// Interface: combinational. vf[k]: unsigned FRAC_W-bit fraction of phase k.
// val[r]: r-th largest component (val[0] is the largest). idx[r]: its phase.
module sorter
  import svpwm_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned FRAC_W = DEF_FRAC_W,
  localparam int unsigned IW    = idx_w(P)
) (
  input  logic [P-1:0][FRAC_W-1:0] vf,
  output logic [P-1:0][FRAC_W-1:0] val,
  output logic [P-1:0][IW-1:0]     idx
);

  logic [IW-1:0] rank [P];

  // Rank of each component: how many components sort ahead of it.
  always_comb begin
    for (int k = 0; k < P; k++) begin
      rank[k] = '0;
      for (int j = 0; j < P; j++) begin
        if (j != k && (vf[j] > vf[k] || (vf[j] == vf[k] && j < k)))
          rank[k] = rank[k] + 1'b1;
      end
    end
  end

  // Ranks form a permutation, so exactly one phase matches each position.
  always_comb begin
    for (int r = 0; r < P; r++) begin
      val[r] = '0;
      idx[r] = '0;
      for (int k = 0; k < P; k++) begin
        if (rank[k] == IW'(r)) begin
          val[r] = val[r] | vf[k];
          idx[r] = idx[r] | IW'(k);
        end
      end
    end
  end

  // The output must obey the ordering v-hat_f(1) >= ... >= v-hat_f(P).
  always_comb begin
    for (int r = 1; r < P; r++)
      assert (val[r-1] >= val[r]) else $error("sorter: output not descending");
  end

endmodule
