// fc_top: 8-bit fuzzy coprocessor.
//
// A host microcontroller starts a control cycle by writing the start
// information (first knowledge base, on- or off-chip knowledge base memory,
// interrupt enable) to the control register, then writes the inputs one by
// one into the data register, four per IOR request. The coprocessor fuzzifies
// each input by table look-up, runs every rule once per group of four inputs
// (MIN of the antecedents, MAX or bounded-sum aggregation into eight OMF
// weights), follows linked knowledge bases, then sweeps the 256 output points
// (MAX or bounded-sum inference) while integrating the fuzzy output, and
// divides to get the crisp output (Centre of Gravity or Mean of Maxima). IOR
// and irq tell the host that the output is in the data register.
//
// Blocks: microcontroller interface, clock generator, KBM interface with
// on-chip ROM, fuzzifier, rule decoder, rule evaluator with on-chip RAM,
// inference, defuzzifier and control, as in the published block diagram; the
// 8-bit internal data bus and the 15-bit ROM bus connect them.
//
// Clocking: everything runs on sys_clk = clk_xtal / CLK_DIV, brought out as
// clk_out. The host bus and the off-chip KBM bus are synchronous to clk_out
// (this design's choice); the off-chip memory must return the word one
// clk_out cycle after kbm_rd/kbm_addr. rom_prog_* loads the on-chip ROM
// contents (the mask programming of the real part) and is clocked by clk_out.
module fc_top
  import fc_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 2,
  parameter int unsigned ROM_DEPTH = 32768
) (
  input  logic       clk_xtal,
  input  logic       rst_n,
  output logic       clk_out,
  // host bus
  input  logic       hb_cs,
  input  logic       hb_wr,
  input  logic       hb_rd,
  input  logic       hb_a,
  input  logic [7:0] hb_wdata,
  output logic [7:0] hb_rdata,
  output logic       irq,
  // off-chip KBM bus
  output logic       kbm_rd,
  output kaddr_t     kbm_addr,
  input  kword_t     kbm_data,
  // on-chip ROM contents
  input  logic       rom_prog_we,
  input  kaddr_t     rom_prog_addr,
  input  kword_t     rom_prog_data
);
  logic sys_clk, sys_rst_n;

  fc_clock_gen #(.DIV(CLK_DIV)) u_clk (
    .clk_xtal, .rst_n, .sys_clk, .sys_rst_n
  );
  assign clk_out = sys_clk;

  // internal data bus
  logic       start, start_ext, in_valid, in_ack, ior_set, out_set, busy;
  logic [5:0] start_kb;
  logic [7:0] in_data;
  grade_t     out_data;

  // KBM interface and ROM bus
  kbm_req_e   req;
  logic       ext_sel;
  logic [5:0] kb;
  logic [1:0] kbd_word;
  logic [7:0] in_idx, x_addr;
  kaddr_t     sr_off, imf_base, sr_base, rom_addr;
  logic [6:0] omf_page;
  logic       rom_en;
  kword_t     rom_data, rom_bus;

  // datapath
  logic                    fz_load;
  logic [1:0]              fz_lane;
  mf_entry_t [LANES-1:0]   fz;
  grade_t    [LANES-1:0]   deg;
  logic [2:0]              rule_omf;
  logic                    rule_active;
  logic                    ev_clr, ev_valid, ev_first, ev_last;
  logic [7:0]              ev_rule;
  algo_t                   algo;
  grade_t    [N_OMF-1:0]   weight;
  grade_t                  mu_x;
  logic                    dz_acc, dz_first, dz_start, dz_done, dz_busy;
  logic [7:0]              dz_x;

  fc_host_if u_host (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .cs(hb_cs), .wr(hb_wr), .rd(hb_rd), .a(hb_a), .wdata(hb_wdata), .rdata(hb_rdata), .irq,
    .start, .start_kb, .start_ext, .in_valid, .in_data, .in_ack,
    .ior_set, .out_set, .out_data, .busy
  );

  fc_control #(.NR(MAX_NR)) u_ctrl (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .start, .start_kb, .start_ext, .in_valid, .in_ack, .ior_set, .out_set, .busy,
    .req, .ext_sel, .kb, .kbd_word, .in_idx, .sr_off, .x_addr,
    .imf_base, .omf_page, .sr_base, .bus(rom_bus),
    .fz_load, .fz_lane,
    .ev_clr, .ev_valid, .ev_rule, .ev_first, .ev_last, .algo,
    .dz_acc, .dz_first, .dz_x, .dz_start, .dz_done
  );

  fc_kbm_if u_kbm (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .req, .ext_sel, .kb, .kbd_word, .in_idx, .in_val(in_data), .sr_off, .x(x_addr),
    .imf_base, .omf_page, .sr_base,
    .rom_en, .rom_addr, .rom_data,
    .ext_rd(kbm_rd), .ext_addr(kbm_addr), .ext_data(kbm_data),
    .bus(rom_bus)
  );

  fc_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(sys_clk), .rd_en(rom_en), .rd_addr(rom_addr), .rd_data(rom_data),
    .prog_we(rom_prog_we), .prog_addr(rom_prog_addr), .prog_data(rom_prog_data)
  );

  fc_fuzzifier u_fuzz (
    .clk(sys_clk), .rst_n(sys_rst_n), .load(fz_load), .lane(fz_lane), .entry(rom_bus), .fz
  );

  fc_rule_decoder u_dec (
    .rule(rom_bus), .fz, .deg, .omf(rule_omf), .active(rule_active)
  );

  fc_rule_evaluator #(.NR(MAX_NR)) u_eval (
    .clk(sys_clk), .rst_n(sys_rst_n), .clr_w(ev_clr), .valid(ev_valid),
    .rule_idx(ev_rule), .first_seg(ev_first), .last_seg(ev_last),
    .rule_bsum(algo.rule_bsum), .deg, .omf(rule_omf), .active(rule_active), .weight
  );

  fc_inference u_inf (
    .entry(rom_bus), .weight, .inf_bsum(algo.inf_bsum), .mu_out(mu_x)
  );

  fc_defuzzifier u_defz (
    .clk(sys_clk), .rst_n(sys_rst_n), .acc(dz_acc), .first(dz_first), .x(dz_x),
    .mu(mu_x), .mom(algo.mom), .start(dz_start), .busy(dz_busy), .done(dz_done),
    .result(out_data)
  );
endmodule
