// fc_control: sequencer of one control cycle of the fuzzy coprocessor.
//
// A control cycle computes one crisp output:
//   KBD   read the four descriptor words of the current knowledge base (KB)
//   REQ   raise IOR to ask the host for the next four inputs, and read the
//         segment's word of the IMF directory
//   DIR   keep that word: the start of the four IMF tables of this segment
//   WAIT  / FUZ  for each of the four inputs: read its IMF entry, store it
//   RULE  one clock per rule: decode and evaluate segment seg of rule r;
//         after the last rule, the next segment (back to REQ), or the next
//         linked KB (back to KBD), or the inference sweep
//   INF   one clock per output point x = 0..255: inference and accumulation
//   DIV   RO+1 clocks of division; then the crisp output goes to the host
// The OMF entry for x = 0 and the first rule word of a segment are addressed
// in the clock before they are used, so the RULE, INF and DIV states together
// last exactly nr*nc + 2^RO + RO + 1 clocks per output, the published timing
// equation. KBD reads (5 clocks per KB), directory reads (2 clocks per group of
// four inputs) and input fuzzification (2 clocks per input plus the host's
// own time) are counted by that equation as host transfer time.
//
// A linked KB is the next one in number (kb+1); each KB has its own nr, nc,
// tables and algorithm; the weights are cleared only at the start, so all
// linked KBs' rules feed the same output. The inference and defuzzifier use
// the algorithm and OMF table of the last KB of the chain.
// The state order follows the published operation; the KBD layout, the IMF
// directory (which lets segments share tables, so that a rule over 256 inputs
// fits the memory), the link rule and the exact clocking are this design's
// choice.
module fc_control
  import fc_pkg::*;
#(
  parameter int unsigned NR = MAX_NR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // microcontroller interface
  input  logic                  start,
  input  logic [5:0]            start_kb,
  input  logic                  start_ext,
  input  logic                  in_valid,
  output logic                  in_ack,
  output logic                  ior_set,
  output logic                  out_set,
  output logic                  busy,
  // KBM interface
  output kbm_req_e              req,
  output logic                  ext_sel,
  output logic [5:0]            kb,
  output logic [1:0]            kbd_word,
  output logic [7:0]            in_idx,
  output kaddr_t                sr_off,
  output logic [7:0]            x_addr,
  output kaddr_t                imf_base,
  output logic [6:0]            omf_page,
  output kaddr_t                sr_base,
  input  kword_t                bus,
  // fuzzifier
  output logic                  fz_load,
  output logic [1:0]            fz_lane,
  // rule evaluator
  output logic                  ev_clr,
  output logic                  ev_valid,
  output logic [$clog2(NR)-1:0] ev_rule,
  output logic                  ev_first,
  output logic                  ev_last,
  output algo_t                 algo,
  // inference / defuzzifier
  output logic                  dz_acc,
  output logic                  dz_first,
  output logic [7:0]            dz_x,
  output logic                  dz_start,
  input  logic                  dz_done
);
  typedef enum logic [3:0] {
    S_IDLE, S_KBD, S_REQ, S_DIR, S_WAIT, S_FUZ, S_RULE, S_INF, S_DIV
  } state_e;

  state_e     state;
  logic [2:0] kcnt;
  kbd_ctrl_t  ctrl;
  logic [5:0] seg;
  logic [1:0] lane;
  logic [7:0] r;
  logic [7:0] x;
  kaddr_t     seg_off;
  kaddr_t     imf_dir;
  kaddr_t     seg_imf;
  logic       div_first;
  kbd_omf_t   kw2;

  assign kw2      = kbd_omf_t'(bus);

  assign busy     = (state != S_IDLE);
  assign kbd_word = kcnt[1:0];
  assign in_idx   = {seg, lane};
  assign fz_lane  = lane;
  assign ev_rule  = $bits(ev_rule)'(r);
  assign ev_first = (seg == 6'd0);
  assign ev_last  = (seg == ctrl.nc_m1);
  assign dz_x     = x;
  assign dz_first = (x == 8'd0);

  always_comb begin
    req      = KBM_NONE;
    sr_off   = seg_off;
    x_addr   = x;
    imf_base = seg_imf;
    in_ack   = 1'b0;
    ior_set  = 1'b0;
    out_set  = 1'b0;
    fz_load  = 1'b0;
    ev_clr   = 1'b0;
    ev_valid = 1'b0;
    dz_acc   = 1'b0;
    dz_start = 1'b0;
    unique case (state)
      S_IDLE: ev_clr = start;
      S_KBD:  if (kcnt < 3'd4) req = KBM_KBD;
      S_REQ: begin
        ior_set  = 1'b1;
        req      = KBM_DIR;
        imf_base = imf_dir;
      end
      S_WAIT: if (in_valid) begin
        req    = KBM_IMF;
        in_ack = 1'b1;
      end
      S_FUZ: begin
        fz_load = 1'b1;
        if (lane == 2'd3) req = KBM_SR;           // rule 0 of this segment
      end
      S_RULE: begin
        ev_valid = 1'b1;
        if (r != ctrl.nr_m1) begin
          req    = KBM_SR;
          sr_off = seg_off + KAW'(r) + 1'b1;
        end else if (ev_last && !ctrl.link) begin
          req    = KBM_OMF;                        // output point 0
          x_addr = 8'd0;
        end
      end
      S_INF: begin
        dz_acc = 1'b1;
        if (x != 8'hff) begin
          req    = KBM_OMF;
          x_addr = x + 1'b1;
        end
      end
      S_DIV: begin
        dz_start = div_first;
        out_set  = dz_done;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      kcnt      <= '0;
      ctrl      <= '0;
      seg       <= '0;
      lane      <= '0;
      r         <= '0;
      x         <= '0;
      seg_off   <= '0;
      kb        <= '0;
      ext_sel   <= 1'b0;
      imf_dir   <= '0;
      seg_imf   <= '0;
      omf_page  <= '0;
      sr_base   <= '0;
      algo      <= '0;
      div_first <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          kb      <= start_kb;
          ext_sel <= start_ext;
          kcnt    <= '0;
          state   <= S_KBD;
        end
        S_KBD: begin
          kcnt <= kcnt + 1'b1;
          unique case (kcnt)
            3'd1: ctrl     <= kbd_ctrl_t'(bus);
            3'd2: imf_dir  <= bus;
            3'd3: {algo, omf_page} <= {kw2.algo, kw2.omf_page};
            3'd4: sr_base  <= bus;
            default: ;
          endcase
          if (kcnt == 3'd4) begin
            seg     <= '0;
            seg_off <= '0;
            state   <= S_REQ;
          end
        end
        S_REQ: begin
          lane  <= '0;
          state <= S_DIR;
        end
        S_DIR: begin
          seg_imf <= bus;
          state   <= S_WAIT;
        end
        S_WAIT: if (in_valid) state <= S_FUZ;
        S_FUZ: begin
          lane <= lane + 1'b1;
          if (lane == 2'd3) begin
            r     <= '0;
            state <= S_RULE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_RULE: begin
          if (r != ctrl.nr_m1) begin
            r <= r + 1'b1;
          end else if (!ev_last) begin
            seg     <= seg + 1'b1;
            seg_off <= seg_off + KAW'(ctrl.nr_m1) + 1'b1;
            state   <= S_REQ;
          end else if (ctrl.link) begin
            kb    <= kb + 1'b1;
            kcnt  <= '0;
            state <= S_KBD;
          end else begin
            x     <= '0;
            state <= S_INF;
          end
        end
        S_INF: begin
          x <= x + 1'b1;
          if (x == 8'hff) begin
            div_first <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: begin
          div_first <= 1'b0;
          if (dz_done) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rule_idx: assert property (@(posedge clk) disable iff (!rst_n)
    ev_valid |-> (int'(r) < NR))
    else $error("rule index beyond the rule RAM");
endmodule
