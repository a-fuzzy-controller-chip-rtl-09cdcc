// fc_rule_evaluator: fulfilment values of the rules and the OMF weights.
//
// Each clock of a rule pass brings the four antecedent degrees of one rule
// segment. Their MIN is the segment's fulfilment. A rule with more than four
// inputs is split into segments that arrive in separate passes, one pass per
// group of four inputs; the partial MIN of every rule is kept in an on-chip RAM
// of NR bytes between passes (first pass writes, later passes read-MIN-write).
// In the last pass the fulfilment value of an active rule (the decoder's
// active flag: no antecedent degree is zero) is aggregated into the weight
// of its output membership function, either by MAX or by bounded sum (BSUM,
// saturating at 255). clr_w zeroes the eight weights at the start of a control
// cycle; linked knowledge bases keep adding to the same weights.
//
// Timing: one rule segment per clock; the RAM is read combinationally and
// written at the clock edge; weights are valid the clock after the last rule.
// MIN, MAX/BSUM and the need for the RAM are published; the one-byte-per-rule
// RAM organisation is this design's choice.
module fc_rule_evaluator
  import fc_pkg::*;
#(
  parameter int unsigned NR = MAX_NR   // rules per knowledge base
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr_w,
  input  logic                  valid,
  input  logic [$clog2(NR)-1:0] rule_idx,
  input  logic                  first_seg,
  input  logic                  last_seg,
  input  logic                  rule_bsum,
  input  grade_t [LANES-1:0]    deg,
  input  logic [2:0]            omf,
  input  logic                  active,
  output grade_t [N_OMF-1:0]    weight
);
  grade_t ram [NR];
  grade_t seg_min, fulfil;

  always_comb begin
    seg_min = '1;
    for (int i = 0; i < LANES; i++) seg_min = gmin(seg_min, deg[i]);
    fulfil = first_seg ? seg_min : gmin(seg_min, ram[rule_idx]);
  end

  always_ff @(posedge clk) begin
    if (valid && !last_seg) ram[rule_idx] <= fulfil;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      weight <= '0;
    end else if (clr_w) begin
      weight <= '0;
    end else if (valid && last_seg && active) begin
      weight[omf] <= rule_bsum ? bsum(weight[omf], fulfil) : gmax(weight[omf], fulfil);
    end
  end
endmodule
