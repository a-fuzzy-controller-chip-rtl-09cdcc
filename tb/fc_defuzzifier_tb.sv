// fc_defuzzifier_tb: random fuzzy outputs swept over the 256 output points,
// then a division. The expected crisp value is computed here in real
// arithmetic: centre of gravity sum(x*mu)/sum(mu), or the mean of the points
// where mu is largest, rounded to nearest; 0 for an all-zero fuzzy output.
// Checks that done comes in the 9th clock counted from start, so that one
// output takes 256 + 9 clocks.
`timescale 1ns/1ps
module fc_defuzzifier_tb;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0, acc = 0, first = 0, mom = 0, start = 0;
  logic [RO-1:0] x = '0;
  grade_t mu = '0, result;
  logic busy, done;
  int checks = 0, failures = 0, n_zero = 0, n_mom = 0, n_cog = 0;
  int mus[256];

  fc_defuzzifier dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      int kind, lo, hi, peak, s0, mx, mxc, exp_r, clocks;
      longint s1;
      real mxs;
      kind = t % 6;
      lo = $urandom_range(0, 255); hi = $urandom_range(lo, 255); peak = $urandom_range(1, 255);
      for (int i = 0; i < 256; i++) begin
        case (kind)
          0: mus[i] = 0;                                           // empty
          1: mus[i] = (i >= lo && i <= hi) ? peak : 0;             // plateau
          2: mus[i] = $urandom_range(0, 255);                      // noise
          3: mus[i] = (i < lo) ? 0 : (i - lo > peak ? peak : i - lo); // ramp, clipped
          4: mus[i] = $urandom_range(0, 3) * 85;                   // many ties
          default: mus[i] = (i == lo || i == hi) ? 255 : 0;        // two peaks
        endcase
      end
      mom = t[0];
      s0 = 0; s1 = 0; mx = -1; mxs = 0; mxc = 0;
      for (int i = 0; i < 256; i++) begin
        s0 += mus[i]; s1 += longint'(i) * mus[i];
        if (mus[i] > mx) begin mx = mus[i]; mxs = i; mxc = 1; end
        else if (mus[i] == mx) begin mxs += i; mxc++; end
      end
      if (s0 == 0) begin exp_r = 0; n_zero++; end
      else if (mom) begin exp_r = $rtoi($floor(mxs / mxc + 0.5)); n_mom++; end
      else begin exp_r = $rtoi($floor(real'(s1) / real'(s0) + 0.5)); n_cog++; end
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        acc = 1; first = (i == 0); x = RO'(i); mu = grade_t'(mus[i]);
      end
      @(negedge clk);
      acc = 0; start = 1;
      clocks = 1;
      #1;
      while (!done) begin
        @(negedge clk);
        start = 0;
        clocks++;
        #1;
        if (clocks > 20) break;
      end
      check(clocks == 9, $sformatf("division took %0d clocks", clocks));
      check(int'(result) == exp_r, $sformatf("test %0d kind %0d mom %b: result %0d expected %0d",
                                             t, kind, mom, result, exp_r));
      @(negedge clk);
      check(!busy, "divider idle after done");
    end
    check(n_zero > 0 && n_mom > 0 && n_cog > 0, "all cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
