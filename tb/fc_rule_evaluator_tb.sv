// fc_rule_evaluator_tb: rule passes of 1 to 4 segments with random degrees.
// The expected OMF weights are computed here: per rule the MIN over all
// degrees of all its segments, aggregated per OMF by MAX or by bounded sum.
// One rule segment is presented per clock, back to back, and the weights are
// checked in the clock after the last one. Also checks that clr_w clears them.
`timescale 1ns/1ps
module fc_rule_evaluator_tb;
  import fc_pkg::*;
  localparam int NR = 256;
  logic clk = 0, rst_n = 0, clr_w = 0, valid = 0, first_seg = 0, last_seg = 0, rule_bsum = 0;
  logic [7:0] rule_idx = '0;
  grade_t [LANES-1:0] deg = '0;
  logic [2:0] omf = '0;
  logic active = 0;
  grade_t [N_OMF-1:0] weight;
  int checks = 0, failures = 0, n_sat = 0, n_multi = 0;
  int f[NR], o[NR], w[N_OMF];

  fc_rule_evaluator #(.NR(NR)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int nr, nc;
      bit bs;
      nr = (t % 5 == 0) ? 256 : $urandom_range(1, 100);
      nc = 1 + t % 4;
      bs = t[1];
      @(negedge clk) clr_w = 1;
      @(negedge clk) clr_w = 0;
      for (int i = 0; i < N_OMF; i++) w[i] = 0;
      for (int r = 0; r < nr; r++) begin f[r] = 255; o[r] = $urandom_range(0, 7); end
      rule_bsum = bs;
      for (int s = 0; s < nc; s++) begin
        for (int r = 0; r < nr; r++) begin
          int m;
          m = 255;
          @(negedge clk);
          valid = 1; rule_idx = 8'(r); first_seg = (s == 0); last_seg = (s == nc - 1);
          omf = 3'(o[r]);
          for (int l = 0; l < LANES; l++) begin
            deg[l] = grade_t'(($urandom_range(0, 3) == 0) ? 0 : $urandom_range(100, 255));
            if (int'(deg[l]) < m) m = int'(deg[l]);
          end
          active = (m != 0);
          if (m < f[r]) f[r] = m;
        end
        @(negedge clk) valid = 0;
      end
      for (int r = 0; r < nr; r++)
        if (f[r] > 0) begin
          if (bs) begin
            if (w[o[r]] + f[r] > 255) n_sat++;
            w[o[r]] = (w[o[r]] + f[r] > 255) ? 255 : w[o[r]] + f[r];
          end else if (f[r] > w[o[r]]) w[o[r]] = f[r];
        end
      if (nc > 1) n_multi++;
      for (int i = 0; i < N_OMF; i++) begin
        checks++;
        if (int'(weight[i]) != w[i]) begin
          failures++;
          $display("FAIL: test %0d nc %0d bsum %0d: weight[%0d]=%0d expected %0d", t, nc, bs, i, weight[i], w[i]);
        end
      end
    end
    @(negedge clk) clr_w = 1;
    @(negedge clk) clr_w = 0;
    checks++;
    if (weight != '0) begin failures++; $display("FAIL: clr_w"); end
    checks++;
    if (n_sat == 0 || n_multi == 0) begin failures++; $display("FAIL: no saturation or no multi-segment pass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
