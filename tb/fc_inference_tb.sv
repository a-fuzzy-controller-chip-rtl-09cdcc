// fc_inference_tb: random OMF entries and weights. The expected fuzzy output
// value is computed here: each hit OMF clipped by its weight, the two clipped
// values combined by MAX or by bounded sum; a second hit past OMF 7 is ignored.
`timescale 1ns/1ps
module fc_inference_tb;
  import fc_pkg::*;
  kword_t entry;
  grade_t [N_OMF-1:0] weight;
  logic inf_bsum;
  grade_t mu_out;
  int checks = 0, failures = 0, n_overlap_sum = 0;

  fc_inference dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int a, m, c0, c1, exp_mu;
      entry = kword_t'($urandom);
      for (int k = 0; k < N_OMF; k++) weight[k] = grade_t'($urandom);
      inf_bsum = 1'($urandom);
      #1;
      a  = int'(entry[10:8]);
      m  = int'(entry[7:0]);
      c0 = (int'(weight[a]) < m) ? int'(weight[a]) : m;
      c1 = 0;
      if (entry[11] && a < 7) c1 = (int'(weight[a + 1]) < 255 - m) ? int'(weight[a + 1]) : 255 - m;
      if (inf_bsum) begin
        exp_mu = (c0 + c1 > 255) ? 255 : c0 + c1;
        if (c0 > 0 && c1 > 0) n_overlap_sum++;
      end else exp_mu = (c0 > c1) ? c0 : c1;
      checks++;
      if (int'(mu_out) != exp_mu) begin
        failures++;
        $display("FAIL: entry %h weights %h bsum %b: %0d expected %0d", entry, weight, inf_bsum, mu_out, exp_mu);
      end
    end
    checks++;
    if (n_overlap_sum == 0) begin failures++; $display("FAIL: no overlap under BSUM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
