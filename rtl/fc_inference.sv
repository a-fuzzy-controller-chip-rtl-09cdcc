// fc_inference: value of the fuzzy output at one output point.
//
// The OMF look-up entry of output point x names the first hit output
// membership function a with grade mu and says whether a+1 is hit too (grade
// 255-mu). Each hit OMF is clipped by its weight from the rule evaluator
// (MIN), and the clipped values are combined with MAX or with the bounded sum.
// With BSUM the overlap of adjacent OMFs adds into the fuzzy output; with MAX
// it does not.
//
// Purely combinational, one output point per clock. MAX/BSUM of the weighted
// OMFs is published; clipping (MIN) as the weighting is this design's choice.
module fc_inference
  import fc_pkg::*;
(
  input  kword_t             entry,
  input  grade_t [N_OMF-1:0] weight,
  input  logic               inf_bsum,
  output grade_t             mu_out
);
  mf_entry_t e;
  grade_t    c0, c1;

  assign e = mf_entry_t'(entry);

  always_comb begin
    c0 = gmin(weight[e.lbl], e.mu);
    c1 = '0;
    if (e.nxt && e.lbl != 3'd7) c1 = gmin(weight[e.lbl + 3'd1], ~e.mu);
    mu_out = inf_bsum ? bsum(c0, c1) : gmax(c0, c1);
  end
endmodule
