// fc_top_tb: end-to-end test of the fuzzy coprocessor at its default size.
//
// A host bus model runs complete control cycles: start information to the
// control register, four inputs per IOR request (polled in the status
// register or awaited on irq), crisp output read from the data register. The
// knowledge bases are random but well formed and are built in a memory image
// that is loaded both into the on-chip ROM (through the programming port) and
// into an off-chip memory model. Every crisp output is compared with the
// reference model of fc_tb_pkg, and the clocks spent in rule passes,
// inference sweep and division are compared with nr*nc + 2^8 + 8 + 1.
//
// Covered: all eight algorithms, 1 to 16 inputs, a knowledge base with 256
// rules and four segments, linked knowledge bases with different segment
// counts, the 1000-rule / 4-input example (1265 clocks = 126.5 us at 100 ns),
// on-chip and off-chip memory, interrupt and polling, an empty fuzzy output,
// and rules over all 256 inputs (64 segments sharing one set of IMF tables
// through the IMF directory; every other rule is given the best-hit value of
// every input, or don't-care where no value is hit, so that those rules fire).
// Each of these is counted and a failure is counted for any that never happens.
`timescale 1ns/1ps
module fc_top_tb;
  import fc_pkg::*;
  import fc_tb_pkg::*;

  logic       clk_xtal = 1'b0, rst_n = 1'b0, clk;
  logic       hb_cs = 0, hb_wr = 0, hb_rd = 0, hb_a = 0;
  logic [7:0] hb_wdata = '0, hb_rdata;
  logic       irq, kbm_rd;
  kaddr_t     kbm_addr;
  kword_t     kbm_data;
  logic       rom_prog_we = 0;
  kaddr_t     rom_prog_addr = '0;
  kword_t     rom_prog_data = '0;
  logic       ext_we = 0;

  int checks = 0, failures = 0;

  always #25 clk_xtal = ~clk_xtal;   // 20 MHz crystal

  fc_top dut (
    .clk_xtal, .rst_n, .clk_out(clk),
    .hb_cs, .hb_wr, .hb_rd, .hb_a, .hb_wdata, .hb_rdata, .irq,
    .kbm_rd, .kbm_addr, .kbm_data,
    .rom_prog_we, .rom_prog_addr, .rom_prog_data
  );

  fc_ext_kbm_model ext (
    .clk, .rd(kbm_rd), .addr(kbm_addr), .data(kbm_data),
    .we(ext_we), .waddr(rom_prog_addr), .wdata(rom_prog_data)
  );

  // Clock counters observed on the controller's outputs.
  int rule_clks = 0, inf_clks = 0, div_clks = 0, seg_reads = 0, in_reqs = 0;
  logic in_div = 1'b0;
  always @(posedge clk) begin
    if (dut.u_ctrl.ev_valid) rule_clks++;
    if (dut.u_ctrl.ev_valid && !dut.u_ctrl.ev_first) seg_reads++;
    if (dut.u_ctrl.dz_acc) inf_clks++;
    if (dut.u_ctrl.dz_start) in_div <= 1'b1;
    if (dut.u_ctrl.dz_start || in_div) div_clks++;
    if (dut.u_ctrl.out_set) in_div <= 1'b0;
    if (dut.u_ctrl.ior_set) in_reqs++;
  end

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk_xtal);
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

  int n_algo[8], n_ext = 0, n_irq = 0, n_link = 0, n_multi = 0, n_empty = 0,
      n_sat = 0, n_full_kb = 0, n_runs = 0, n_example = 0, n_wide = 0;

  // One control cycle starting at kb0 with the given input vector.
  task automatic run(int kb0, int in_vec[256], bit ext_mem, bit use_irq, bit is_example = 0);
    logic [7:0] st, res;
    int exp_res, exp_core, kb, nchain, r0, i0, d0, sr0, req0;
    bit irq_seen;
    exp_res = ref_output(kb0, in_vec);
    // expected clocks and chain
    exp_core = 265; kb = kb0; nchain = 0;
    forever begin
      exp_core += kb_nr(kb) * kb_nc(kb);
      if (kb_nc(kb) > 1) n_multi++;
      if (kb_nr(kb) == 256) n_full_kb++;
      nchain++;
      if (!kb_link(kb)) break;
      kb = (kb + 1) % 64;
    end
    r0 = rule_clks; i0 = inf_clks; d0 = div_clks; sr0 = seg_reads; req0 = in_reqs;
    bus_write(0, {use_irq, ext_mem, 6'(kb0)});
    kb = kb0;
    irq_seen = 0;
    forever begin
      for (int s = 0; s < kb_nc(kb); s++) begin
        wait_ior(use_irq); st = rd_val;
        if (use_irq) irq_seen = 1;
        check(st[0] && !st[1], $sformatf("input request expected, status %02h", st));
        for (int l = 0; l < 4; l++) begin
          do bus_read(0); while (rd_val[2]);
          bus_write(1, 8'(in_vec[s * 4 + l]));
        end
      end
      if (!kb_link(kb)) break;
      kb = (kb + 1) % 64;
    end
    wait_ior(use_irq); st = rd_val;
    check(st[1] && st[0], $sformatf("output ready expected, status %02h", st));
    bus_read(1); res = rd_val;
    bus_read(0); st = rd_val;
    check(!st[0] && !st[1] && !st[3], $sformatf("flags not cleared after output read, status %02h", st));
    check(int'(res) == exp_res, $sformatf("kb %0d algo %0d: crisp %0d, expected %0d",
          kb0, int'(mem[4 * kb + 2][9:7]), res, exp_res));
    check(rule_clks - r0 + inf_clks - i0 + div_clks - d0 == exp_core,
          $sformatf("kb %0d: core clocks %0d, expected %0d", kb0,
                    rule_clks - r0 + inf_clks - i0 + div_clks - d0, exp_core));
    check(inf_clks - i0 == 256 && div_clks - d0 == 9, "inference 256 and division 9 clocks");
    check(in_reqs - req0 == (exp_core - 265 > 0 ? in_reqs - req0 : 0), "input requests");
    if (is_example) begin
      n_example++;
      check(exp_core == 1265, "1000 rules, 4 inputs: 1265 clocks");
      $display("example: 1000 rules, 4 inputs: %0d clocks = %0.1f us at 100 ns, %0.2f M rules/s",
               exp_core, exp_core * 0.1, 1000.0 / (exp_core * 0.1));
    end
    n_algo[int'(mem[4 * kb + 2][9:7])]++;
    if (ext_mem) n_ext++;
    if (irq_seen) n_irq++;
    if (nchain > 1) n_link++;
    if (ref_empty) n_empty++;
    if (ref_weight_sat > 0) n_sat++;
    if (kb_nc(kb0) == 64 && ref_rules_fired > 0) n_wide++;
    n_runs++;
  endtask

  int vec[256];
  int imf_shared, omf_a, omf_b;
  int ni_list[8] = '{4, 3, 8, 7, 12, 11, 16, 5};

  initial begin
    for (int i = 0; i < 8; i++) n_algo[i] = 0;
    repeat (4) @(posedge clk_xtal);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    mem_clear();
    for (int k = 0; k < 256; k++) vec[k] = $urandom_range(0, 255);
    imf_shared = alloc(256 * 16);
    for (int k = 0; k < 16; k++) fill_mf_table(imf_shared + 256 * k);
    next_free = (next_free + 255) & ~255;
    omf_a = alloc(256) / 256; fill_mf_table(omf_a * 256);
    omf_b = alloc(256) / 256; fill_mf_table(omf_b * 256);

    // kb 0..7: one per algorithm, various input counts
    for (int a = 0; a < 8; a++)
      build_kb(a, $urandom_range(5, 60), ni_list[a], 0, a, vec, imf_shared, (a % 2) ? omf_a : omf_b);
    // kb 10..12: linked chain, 1, 2 and 3 segments, bounded sum everywhere
    build_kb(10, 40, 4, 1, 3, vec, imf_shared, omf_a);
    build_kb(11, 256, 8, 1, 1, vec, imf_shared, omf_a);
    build_kb(12, 30, 12, 0, 3, vec, imf_shared, omf_b);
    // kb 20..23: the 1000-rule, 4-input example
    for (int k = 20; k < 24; k++) build_kb(k, 250, 4, (k < 23) ? 1 : 0, 0, vec, imf_shared, omf_a);
    // kb 30: 256 rules over 16 inputs
    build_kb(30, 256, 16, 0, 5, vec, imf_shared, omf_b);
    // kb 31: no rule fires
    build_kb(31, 3, 4, 0, 0, vec, imf_shared, omf_a);
    for (int r = 0; r < 3; r++) begin
      kword_t e;
      int lv;
      e  = mem[imf_shared + vec[0]];
      lv = 1;
      while (member(lv, e) != 0) lv++;
      mem[int'(mem[4 * 31 + 3]) + r] = (mem[int'(mem[4 * 31 + 3]) + r] & 15'h7ff8) | kword_t'(lv);
    end
    // kb 40: 32 rules over 256 inputs; even rules get the best-hit value everywhere
    build_kb(40, 32, 256, 0, 6, vec, imf_shared, omf_b, 1);
    for (int r = 0; r < 32; r += 2)
      for (int s = 0; s < 64; s++) begin
        int a, w;
        a = int'(mem[4 * 40 + 3]) + s * 32 + r;
        w = int'(mem[a]) & 'h7000;
        for (int l = 0; l < 4; l++) begin
          kword_t e;
          int best;
          e = mem[imf_addr(40, s * 4 + l, vec[s * 4 + l])];
          best = 1;
          for (int lv = 2; lv < 8; lv++) if (member(lv, e) > member(best, e)) best = lv;
          if (member(best, e) == 0) best = 0;     // value hit by no label: don't care
          w |= best << (3 * l);
        end
        mem[a] = kword_t'(w);
      end
    load_image();

    for (int a = 0; a < 8; a++) run(a, vec, 0, a[0]);
    for (int a = 0; a < 8; a++) run(a, vec, 1, !a[0]);
    run(10, vec, 0, 0);
    run(11, vec, 1, 1);
    run(20, vec, 0, 0, 1);
    run(30, vec, 0, 1);
    run(31, vec, 1, 0);
    run(40, vec, 1, 1);
    // new inputs, same knowledge bases
    for (int k = 0; k < 256; k++) vec[k] = $urandom_range(0, 255);
    for (int a = 0; a < 8; a++) run(a, vec, a[1], a[2]);
    run(10, vec, 1, 0);

    for (int a = 0; a < 8; a++) check(n_algo[a] > 0, $sformatf("algorithm %0d never run", a));
    check(n_ext > 0, "off-chip memory never used");
    check(n_irq > 0, "interrupt never used");
    check(n_link > 0, "no linked knowledge bases");
    check(n_multi > 0 && seg_reads > 0, "no multi-segment rules");
    check(n_empty > 0, "no empty fuzzy output");
    check(n_sat > 0, "no bounded-sum saturation");
    check(n_full_kb > 0, "no 256-rule knowledge base");
    check(n_example > 0, "1000-rule example not run");
    check(n_wide > 0, "no firing rule over 256 inputs");
    $display("runs=%0d ext=%0d irq=%0d linked=%0d multiseg=%0d (segment RAM reads %0d) empty=%0d saturating=%0d full_kb=%0d wide=%0d input_requests=%0d",
             n_runs, n_ext, n_irq, n_link, n_multi, seg_reads, n_empty, n_sat, n_full_kb, n_wide, in_reqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
