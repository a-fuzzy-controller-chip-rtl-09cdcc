// fc_rule_decoder: matches one rule segment against the fuzzified inputs.
//
// A rule segment word carries a linguistic value for each of four inputs
// (0 = the input is not part of the rule) and the index of the rule's output
// membership function. For each lane the decoder compares the rule's value
// with the labels the fuzzifier holds: the first hit label gives its grade mu,
// the following label (if hit) gives 255-mu, any other value gives 0, and an
// unused input gives 255 so that it does not limit the MIN. The rule segment
// is active when no lane gives 0.
//
// Purely combinational: the ROM bus word and the degrees are in the same clock.
// The omf output is the word's consequent field passed through unchanged.
// The comparison is published; the word layout and the grades are this
// design's choice (see fc_pkg).
module fc_rule_decoder
  import fc_pkg::*;
(
  input  kword_t                rule,
  input  mf_entry_t [LANES-1:0] fz,
  output grade_t    [LANES-1:0] deg,
  output logic      [2:0]       omf,
  output logic                  active
);
  rule_word_t rw;
  assign rw  = rule_word_t'(rule);
  assign omf = rw.omf;

  function automatic grade_t member(logic [2:0] lv, mf_entry_t e);
    if (lv == 3'd0)                                   return '1;
    if (lv == e.lbl)                                  return e.mu;
    if (e.nxt && ({1'b0, lv} == {1'b0, e.lbl} + 4'd1)) return ~e.mu;
    return '0;
  endfunction

  always_comb begin
    active = 1'b1;
    for (int i = 0; i < LANES; i++) begin
      deg[i] = member(rw.lv[i], fz[i]);
      if (deg[i] == '0) active = 1'b0;
    end
  end
endmodule
