// fc_rule_decoder_tb: random rule words against random fuzzified inputs.
// The expected degree of each antecedent is worked out from the entry fields:
// don't-care 255, first label mu, next label 255-mu when hit, else 0; active
// when no degree is 0; the OMF index is the top three bits of the word.
`timescale 1ns/1ps
module fc_rule_decoder_tb;
  import fc_pkg::*;
  kword_t rule;
  mf_entry_t [LANES-1:0] fz;
  grade_t [LANES-1:0] deg;
  logic [2:0] omf;
  logic active;
  int checks = 0, failures = 0, n_active = 0, n_second = 0;

  fc_rule_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int exp_deg[LANES];
      bit exp_act;
      exp_act = 1;
      for (int l = 0; l < LANES; l++) fz[l] = mf_entry_t'($urandom);
      rule = kword_t'($urandom);
      // bias towards hits
      for (int l = 0; l < LANES; l++)
        if ($urandom_range(0, 1)) rule[3*l +: 3] = fz[l].lbl + 3'($urandom_range(0, 1));
      #1;
      for (int l = 0; l < LANES; l++) begin
        int lv, lb;
        lv = int'(rule[3*l +: 3]);
        lb = int'(fz[l].lbl);
        if (lv == 0) exp_deg[l] = 255;
        else if (lv == lb) exp_deg[l] = int'(fz[l].mu);
        else if (fz[l].nxt && lv == lb + 1) begin exp_deg[l] = 255 - int'(fz[l].mu); n_second++; end
        else exp_deg[l] = 0;
        if (exp_deg[l] == 0) exp_act = 0;
        checks++;
        if (int'(deg[l]) != exp_deg[l]) begin
          failures++;
          $display("FAIL: lane %0d lv %0d entry %h: degree %0d expected %0d rule %h", l, lv, fz[l], deg[l], exp_deg[l], rule);
        end
      end
      checks += 2;
      if (active != exp_act) begin failures++; $display("FAIL: active %b", active); end
      if (omf != rule[14:12]) begin failures++; $display("FAIL: omf %0d", omf); end
      if (exp_act) n_active++;
    end
    checks++;
    if (n_active == 0 || n_second == 0) begin failures++; $display("FAIL: no active rule or no second-label hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
