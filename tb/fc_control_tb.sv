// fc_control_tb: sequencing of control cycles by the controller alone.
// The testbench answers the controller's KBM requests from a knowledge base
// image (word one clock after the request, addresses worked out here), feeds
// inputs when asked and stands in for the divider (done in the 9th clock
// after start). Checked per control cycle: the KBD words are requested for
// every knowledge base of the chain, one IOR per segment, four IMF reads per
// segment with the right input numbers, rule words in order rule 0..nr-1 for
// each segment with first/last flags, 256 output points in order, one division
// start, the output handed over, and nr*nc + 256 + 9 clocks in the rule,
// inference and division states.
`timescale 1ns/1ps
module fc_control_tb;
  import fc_pkg::*;
  import fc_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, start_ext = 0, in_valid = 0, dz_done;
  logic [5:0] start_kb = '0;
  logic in_ack, ior_set, out_set, busy, ext_sel, fz_load, ev_clr, ev_valid, ev_first, ev_last;
  logic dz_acc, dz_first, dz_start;
  kbm_req_e req;
  logic [5:0] kb;
  logic [1:0] kbd_word, fz_lane;
  logic [7:0] in_idx, x_addr, ev_rule, dz_x;
  kaddr_t sr_off, imf_base, sr_base;
  logic [6:0] omf_page;
  kword_t bus;
  algo_t algo;
  int checks = 0, failures = 0;

  fc_control dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model: address map worked out from the request fields
  int last_in_val = 0;
  always @(posedge clk) begin
    int a;
    case (req)
      KBM_KBD: a = 4 * int'(kb) + int'(kbd_word);
      KBM_DIR: a = (int'(imf_base) + int'(in_idx[7:2])) % 32768;
      KBM_IMF: a = (int'(imf_base) + 256 * int'(in_idx[1:0]) + last_in_val) % 32768;
      KBM_SR:  a = (int'(sr_base) + int'(sr_off)) % 32768;
      KBM_OMF: a = 256 * int'(omf_page) + int'(x_addr);
      default: a = 0;
    endcase
    bus <= mem[a];
  end

  // divider stand-in
  int div_cnt = 0;
  always @(posedge clk) begin
    if (dz_start) div_cnt <= 1;
    else if (div_cnt > 0 && div_cnt < 8) div_cnt <= div_cnt + 1;
    else div_cnt <= 0;
  end
  assign dz_done = (div_cnt == 8);

  // observations
  int n_ior = 0, n_fz = 0, n_rule = 0, n_inf = 0, n_start = 0, n_out = 0, n_kbd = 0;
  int core = 0, exp_r = 0, exp_seg = 0, exp_x = 0, seg_cnt = 0, in_cnt = 0;
  bit in_div = 0;
  int cur_nr = 0, cur_nc = 0, cur_seg = 0;
  always @(posedge clk) if (rst_n) begin
    if (ior_set) n_ior++;
    if (fz_load) n_fz++;
    if (req == KBM_KBD && kbd_word == 0) begin
      n_kbd++;
      cur_nr = kb_nr(int'(kb)); cur_nc = kb_nc(int'(kb)); cur_seg = 0; exp_r = 0;
    end
    if (req == KBM_DIR) begin
      check(int'(imf_base) == int'(mem[4 * int'(kb) + 1]) && int'(in_idx[7:2]) == cur_seg,
            $sformatf("IMF directory read of segment %0d", cur_seg));
    end
    if (req == KBM_IMF) begin
      check(int'(imf_base) == int'(mem[(int'(mem[4 * int'(kb) + 1]) + cur_seg) % 32768]),
            $sformatf("IMF tables of segment %0d", cur_seg));
      if (int'(in_idx) != cur_seg * 4 + (in_cnt % 4)) begin
        failures++; $display("FAIL: IMF read for input %0d, expected %0d", in_idx, cur_seg * 4 + in_cnt % 4);
      end
      checks++;
      in_cnt++;
    end
    if (ev_valid) begin
      n_rule++; core++;
      checks++;
      if (int'(ev_rule) != exp_r || ev_first != (cur_seg == 0) || ev_last != (cur_seg == cur_nc - 1)) begin
        failures++;
        $display("FAIL: rule %0d seg %0d first %b last %b, expected rule %0d seg %0d", ev_rule, cur_seg, ev_first, ev_last, exp_r, cur_seg);
      end
      if (exp_r == cur_nr - 1) begin exp_r = 0; cur_seg++; end else exp_r++;
    end
    if (dz_acc) begin
      n_inf++; core++;
      checks++;
      if (int'(dz_x) != exp_x || dz_first != (exp_x == 0)) begin failures++; $display("FAIL: point %0d expected %0d t=%0t state=%s n_out=%0d", dz_x, exp_x, $time, dut.state.name(), n_out); end
      exp_x = (exp_x + 1) % 256;
    end
    if (dz_start) begin n_start++; in_div = 1; end
    if (dz_start || in_div) core++;
    if (out_set) begin n_out++; in_div = 0; end
  end

  // host side: present inputs when asked
  always @(posedge clk) begin
    if (in_ack) begin
      in_valid <= 1'b0;
    end else if (!in_valid && busy && $urandom_range(0, 2) == 0) begin
      in_valid    <= 1'b1;
      last_in_val <= $urandom_range(0, 255);
    end
  end

  task automatic run(int kb0);
    int exp_core, exp_ior, exp_kbd, k;
    exp_core = 265; exp_ior = 0; exp_kbd = 0; k = kb0;
    n_ior = 0; n_fz = 0; n_rule = 0; n_inf = 0; n_start = 0; n_out = 0; n_kbd = 0; core = 0;
    in_cnt = 0;
    forever begin
      exp_core += kb_nr(k) * kb_nc(k);
      exp_ior  += kb_nc(k);
      exp_kbd++;
      if (!kb_link(k)) break;
      k++;
    end
    @(negedge clk) begin start = 1; start_kb = 6'(kb0); start_ext = 1'($urandom); end
    #1 check(ev_clr, "weights cleared at start");
    @(negedge clk) start = 0;
    check(ext_sel == start_ext, "memory select latched");
    while (n_out == 0) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after output");
    check(n_kbd == exp_kbd, $sformatf("KBD fetches %0d expected %0d", n_kbd, exp_kbd));
    check(n_ior == exp_ior, $sformatf("input requests %0d expected %0d", n_ior, exp_ior));
    check(n_fz == 4 * exp_ior, $sformatf("fuzzifier loads %0d", n_fz));
    check(n_inf == 256 && n_start == 1 && n_out == 1, "one sweep, one division, one output");
    check(core == exp_core, $sformatf("kb %0d: core clocks %0d expected %0d", kb0, core, exp_core));
    check(algo == algo_t'(mem[4 * k + 2][9:7]), "algorithm of the last knowledge base");
  endtask

  int vec[256];
  initial begin
    mem_clear();
    for (int i = 0; i < 256; i++) vec[i] = $urandom_range(0, 255);
    build_kb(0, 1, 1, 0, 5, vec);
    build_kb(1, 17, 7, 0, 2, vec);
    build_kb(2, 256, 16, 0, 7, vec);
    build_kb(5, 10, 4, 1, 1, vec);
    build_kb(6, 20, 9, 1, 0, vec);
    build_kb(7, 5, 2, 0, 6, vec);
    build_kb(63, 3, 4, 0, 3, vec);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(5); run(63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
