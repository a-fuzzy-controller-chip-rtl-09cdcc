// fc_host_if_tb: register behaviour of the microcontroller interface.
// Checks the start pulse and start information, that a start is ignored while
// busy, input entry with dr_full/in_ack, IOR set by an input request and
// cleared by the first input write, output hand-over with IOR/out_rdy, their
// clearing on the data read, and irq = ie & IOR. A second phase drives 3000
// clocks of random bus accesses and controller events (keeping the two rules
// the host and controller must obey: no input write while the data register
// is full, no acknowledge while it is empty) and compares every register,
// flag and output with a register model kept here.
`timescale 1ns/1ps
module fc_host_if_tb;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs = 0, wr = 0, rd = 0, a = 0;
  logic [7:0] wdata = '0, rdata;
  logic irq, start, start_ext, in_valid, in_ack = 0, ior_set = 0, out_set = 0, busy = 0;
  logic [5:0] start_kb;
  logic [7:0] in_data;
  grade_t out_data = '0;
  int checks = 0, failures = 0;
  int starts = 0;
  logic [5:0] kb_seen;
  logic       ext_seen;

  fc_host_if dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) begin starts++; kb_seen <= start_kb; ext_seen <= start_ext; end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr_reg(bit ad, logic [7:0] d);
    @(negedge clk); cs = 1; wr = 1; a = ad; wdata = d;
    @(negedge clk); cs = 0; wr = 0;
  endtask

  logic [7:0] rv;
  task automatic rd_reg(bit ad);
    @(negedge clk); cs = 1; rd = 1; a = ad;
    #1 rv = rdata;
    @(negedge clk); cs = 0; rd = 0;
  endtask

  task automatic pulse_ior();
    @(negedge clk) ior_set = 1;
    @(negedge clk) ior_set = 0;
  endtask

  // register model: the later event of one clock wins, as in the design
  task automatic random_phase();
    bit m_ie, m_ior, m_rdy, m_full;
    logic [7:0] m_data;
    int bad;
    bad = 0;
    m_ie = dut.ie; m_ior = dut.ior; m_rdy = dut.out_rdy; m_full = dut.dr_full; m_data = dut.data_reg;
    for (int i = 0; i < 3000; i++) begin
      bit st, wd, rdd;
      @(negedge clk);
      cs = 1'($urandom_range(0, 2) != 0); wr = 1'($urandom); rd = !wr && 1'($urandom);
      a = 1'($urandom); wdata = 8'($urandom);
      if (cs && wr && a && m_full) wr = 0;
      in_ack  = m_full && ($urandom_range(0, 3) == 0);
      ior_set = ($urandom_range(0, 9) == 0);
      out_set = ($urandom_range(0, 19) == 0);
      out_data = 8'($urandom);
      busy = 1'($urandom);
      #1;
      st  = cs && wr && !a && !busy;
      wd  = cs && wr && a;
      rdd = cs && rd && a;
      if (start != st || (st && (start_kb != wdata[5:0] || start_ext != wdata[6]))) bad++;
      if (rdata != (a ? m_data : {4'b0, busy, m_full, m_rdy, m_ior})) bad++;
      if (irq != (m_ie && m_ior) || in_valid != m_full || in_data != m_data) bad++;
      checks++;
      @(posedge clk);
      if (st) begin m_ie = wdata[7]; m_ior = 0; m_rdy = 0; end
      if (in_ack) m_full = 0;
      if (wd) begin m_data = wdata; m_full = 1; m_ior = 0; end
      if (rdd && m_rdy) begin m_ior = 0; m_rdy = 0; end
      if (ior_set) m_ior = 1;
      if (out_set) begin m_data = out_data; m_ior = 1; m_rdy = 1; end
    end
    @(negedge clk);
    cs = 0; wr = 0; rd = 0; in_ack = 0; ior_set = 0; out_set = 0;
    check(bad == 0, $sformatf("random phase: %0d clocks differ from the register model", bad));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd_reg(0);
    check(rv == 8'h00, $sformatf("status after reset %h", rv));
    wr_reg(0, {1'b1, 1'b1, 6'd37});
    check(starts == 1 && kb_seen == 6'd37 && ext_seen == 1'b1, "start pulse with kb 37, ext");
    busy = 1;
    wr_reg(0, 8'h05);
    check(starts == 1, "start ignored while busy");
    pulse_ior();
    rd_reg(0);
    check(rv == 8'h09, $sformatf("status with input request %h", rv));
    check(irq == 1'b1, "irq with ie and IOR");
    wr_reg(1, 8'hA5);
    check(in_valid && in_data == 8'hA5, "input presented");
    rd_reg(0);
    check(rv == 8'h0C, $sformatf("status dr_full, IOR cleared %h", rv));
    check(irq == 1'b0, "irq cleared");
    @(negedge clk) in_ack = 1;
    @(negedge clk) in_ack = 0;
    check(!in_valid, "input taken");
    // output hand-over
    @(negedge clk) begin out_set = 1; out_data = 8'd201; end
    @(negedge clk) out_set = 0;
    busy = 0;
    rd_reg(0);
    check(rv == 8'h03, $sformatf("status output ready %h", rv));
    check(irq, "irq on output");
    rd_reg(1);
    check(rv == 8'd201, $sformatf("crisp output %0d", rv));
    rd_reg(0);
    check(rv == 8'h00, $sformatf("flags cleared by the output read %h", rv));
    // start without interrupt enable
    wr_reg(0, {1'b0, 1'b0, 6'd2});
    check(starts == 2 && kb_seen == 6'd2 && !ext_seen, "second start, kb 2, on-chip");
    pulse_ior();
    check(!irq, "no irq with ie clear");
    rd_reg(0);
    check(rv[0], "IOR still pollable");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
