// fc_fig1_tb: timing sweep over the operating points of the performance plot.
//
// For each number of rules nr (1 to 3000) and each input group (1-4, 5-8,
// 9-12, 13-16 inputs, run with 4, 8, 12 and 16 inputs) a knowledge base chain
// is built (ceil(nr/256) linked knowledge bases sharing their tables), loaded into the on-chip ROM,
// and one control cycle is run through the host bus. The crisp output is
// compared with the reference model and the clocks spent in rule passes,
// inference and division with nr*nc + 265, i.e. t = (nr*nc + 265) * 100 ns.
// A table of t per point is printed. The 10,000-rule points of the plot need
// more knowledge base memory than 32K words for 9 or more inputs and are left
// out; 10,000 rules with 8 inputs (two segments per rule) are run. Last, the
// largest rule base, 16,384 rules in all 64 knowledge bases linked, is run
// with 4 inputs.
`timescale 1ns/1ps
module fc_fig1_tb;
  import fc_pkg::*;
  import fc_tb_pkg::*;

  logic       clk_xtal = 1'b0, rst_n = 1'b0, clk;
  logic       hb_cs = 0, hb_wr = 0, hb_rd = 0, hb_a = 0;
  logic [7:0] hb_wdata = '0, hb_rdata;
  logic       irq, kbm_rd;
  kaddr_t     kbm_addr;
  kword_t     kbm_data = '0;
  logic       rom_prog_we = 0;
  kaddr_t     rom_prog_addr = '0;
  kword_t     rom_prog_data = '0;
  logic       ext_we = 0;

  int checks = 0, failures = 0;

  always #25 clk_xtal = ~clk_xtal;

  fc_top dut (
    .clk_xtal, .rst_n, .clk_out(clk),
    .hb_cs, .hb_wr, .hb_rd, .hb_a, .hb_wdata, .hb_rdata, .irq,
    .kbm_rd, .kbm_addr, .kbm_data,
    .rom_prog_we, .rom_prog_addr, .rom_prog_data
  );

  int core = 0;
  logic in_div = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.ev_valid || dut.u_ctrl.dz_acc || dut.u_ctrl.dz_start || in_div) core++;
    if (dut.u_ctrl.dz_start) in_div <= 1'b1;
    if (dut.u_ctrl.out_set) in_div <= 1'b0;
  end

  initial begin
    repeat (3000000) @(posedge clk_xtal);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(bit a, logic [7:0] d);
    @(negedge clk);
    hb_cs = 1; hb_wr = 1; hb_a = a; hb_wdata = d;
    @(negedge clk);
    hb_cs = 0; hb_wr = 0;
  endtask

  // Last value read from the host bus.
  logic [7:0] rd_val;

  task automatic bus_read(bit a);
    @(negedge clk);
    hb_cs = 1; hb_rd = 1; hb_a = a;
    #1 rd_val = hb_rdata;
    @(negedge clk);
    hb_cs = 0; hb_rd = 0;
  endtask

  // Wait for IOR: by polling the status register, or for irq.
  task automatic wait_ior(bit use_irq);
    if (use_irq) begin
      while (!irq) @(negedge clk);
      bus_read(0);
    end else begin
      rd_val = '0;
      while (!rd_val[0]) bus_read(0);
    end
  endtask

  task automatic load_image();
    for (int i = 0; i < next_free; i++) begin
      @(negedge clk);
      rom_prog_we = 1; ext_we = 1; rom_prog_addr = kaddr_t'(i); rom_prog_data = mem[i];
    end
    @(negedge clk);
    rom_prog_we = 0; ext_we = 0;
  endtask

  int vec[256];

  task automatic point(int nr, int ni);
    int nkb, left, c0, exp_core, exp_res, nc, imf, omfp;
    logic [7:0] res;
    nc = (ni + 3) / 4;
    mem_clear();
    // all knowledge bases of the chain share one set of IMF tables and one OMF table
    imf = alloc(256 * 4 * nc);
    for (int k = 0; k < 4 * nc; k++) fill_mf_table(imf + 256 * k);
    next_free = (next_free + 255) & ~255;
    omfp = alloc(256) / 256;
    fill_mf_table(256 * omfp);
    nkb = (nr + 255) / 256;
    left = nr;
    for (int k = 0; k < nkb; k++) begin
      int n;
      n = left / (nkb - k);
      left -= n;
      build_kb(k, n, ni, (k < nkb - 1) ? 1 : 0, k % 8, vec, imf, omfp);
    end
    load_image();
    exp_res  = ref_output(0, vec);
    exp_core = nr * nc + 265;
    c0 = core;
    bus_write(0, 8'h00);
    for (int k = 0; k < nkb; k++)
      for (int s = 0; s < nc; s++) begin
        wait_ior(0);
        for (int l = 0; l < 4; l++) begin
          do bus_read(0); while (rd_val[2]);
          bus_write(1, 8'(vec[s * 4 + l]));
        end
      end
    wait_ior(0);
    check(rd_val[1], "output ready");
    bus_read(1); res = rd_val;
    check(int'(res) == exp_res, $sformatf("nr %0d ni %0d: crisp %0d expected %0d", nr, ni, res, exp_res));
    check(core - c0 == exp_core, $sformatf("nr %0d ni %0d: %0d clocks expected %0d", nr, ni, core - c0, exp_core));
    $display("nr=%5d ni=%2d nc=%0d KBs=%2d  clocks=%6d  t=%8.1f us  (%0.2f M rules/s)",
             nr, ni, nc, nkb, core - c0, (core - c0) * 0.1, nr / ((core - c0) * 0.1));
  endtask

  int nrs[8] = '{1, 3, 10, 30, 100, 300, 1000, 3000};
  initial begin
    for (int k = 0; k < 256; k++) vec[k] = $urandom_range(0, 255);
    repeat (4) @(posedge clk_xtal);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int g = 1; g <= 4; g++)
      for (int i = 0; i < 8; i++)
        if (!(g >= 2 && nrs[i] < 3) && !(g >= 3 && nrs[i] < 10)) point(nrs[i], 4 * g);
    point(10000, 8);
    point(16384, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
