// fc_clock_gen_tb: checks the system clock divider and the reset release.
// sys_clk must have a period of DIV crystal cycles with a 50% duty cycle,
// stay low during reset, and sys_rst_n must rise on a falling edge of sys_clk,
// two system clocks after rst_n.
`timescale 1ns/1ps
module fc_clock_gen_tb;
  logic clk_xtal = 0, rst_n = 0, sys_clk, sys_rst_n;
  int checks = 0, failures = 0;
  int xt = 0, last_rise = -1, rises = 0, rst_rise_xt = -1, rel_xt;

  fc_clock_gen #(.DIV(2)) dut (.clk_xtal, .rst_n, .sys_clk, .sys_rst_n);

  always #25 clk_xtal = ~clk_xtal;
  always @(posedge clk_xtal) xt++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge sys_clk) if (rst_n) begin
    if (last_rise >= 0) check(xt - last_rise == 2, $sformatf("period %0d crystal cycles", xt - last_rise));
    last_rise = xt;
    rises++;
  end
  always @(posedge sys_rst_n) begin
    rst_rise_xt = xt;
    #1 check(sys_clk == 1'b0, "reset released while sys_clk high");
  end

  initial begin
    repeat (3000) @(posedge clk_xtal);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk_xtal);
    #1 check(sys_clk == 0 && sys_rst_n == 0, "held in reset");
    @(negedge clk_xtal) rst_n = 1;
    rel_xt = xt;
    repeat (40) @(posedge clk_xtal);
    check(rises >= 19, $sformatf("sys_clk rises %0d", rises));
    check(rst_rise_xt > rel_xt && rst_rise_xt - rel_xt <= 5, $sformatf("reset release after %0d crystal cycles", rst_rise_xt - rel_xt));
    // reset again in mid-run
    @(negedge clk_xtal) rst_n = 0;
    #1 check(sys_rst_n == 0, "asynchronous reset assertion");
    repeat (3) @(posedge clk_xtal);
    #1 check(sys_clk == 0, "sys_clk held during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
