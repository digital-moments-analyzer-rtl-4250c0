// prob_comparator: above-level probability gate.
//
// A 4-bit magnitude comparator compares the four most significant converter
// bits A of a sample with a reference level R from the level selector. The
// sample counts when A >= R and its sign equals the selected sign, so over C0
// samples the counter reading C_r estimates the probability that level R is
// exceeded on that side of zero. With interval set, a second comparison against
// R + 1 inhibits the count, so only samples with A == R count: the probability
// of lying within one interval above level R. Purely combinational.
//
// The A >= R test on the four top bits with sign selection follows the built
// circuit; the interval option follows the published proposal of a second
// comparator set to R + 1. Computing R + 1 internally is this design's own.
module prob_comparator #(
  parameter int unsigned W = 4   // comparator width
) (
  input  logic [W-1:0] a,         // m.s. bits of the converter output
  input  logic [W-1:0] ref_lvl,   // reference level R
  input  logic         neg,       // sign of the sample (1: negative)
  input  logic         sel_neg,   // sign selection switch (1: negative side)
  input  logic         interval,  // 1: count A == R only
  output logic         hit
);
  logic ge, above_next;

  always_comb begin
    ge         = (a >= ref_lvl);
    above_next = ({1'b0, a} >= ({1'b0, ref_lvl} + 1'b1));
    hit        = ge && (neg == sel_neg) && !(interval && above_next);
  end
endmodule
