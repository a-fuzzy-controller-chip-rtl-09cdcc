// fc_fuzzifier_tb: loads IMF entries into random lanes and checks that each
// lane holds the last entry loaded into it and that no other lane changes.
`timescale 1ns/1ps
module fc_fuzzifier_tb;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [1:0] lane = '0;
  kword_t entry = '0;
  mf_entry_t [LANES-1:0] fz;
  kword_t model [LANES];
  int checks = 0, failures = 0;

  fc_fuzzifier dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LANES; l++) model[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 3) != 0);
      lane = 2'($urandom);
      entry = kword_t'($urandom);
      if (load) model[lane] = entry;
      @(negedge clk);
      load = 0;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (kword_t'(fz[l]) !== model[l]) begin
          failures++;
          $display("FAIL: lane %0d holds %h expected %h", l, fz[l], model[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
