// fc_kbm_if: knowledge base memory interface.
//
// Turns the controller's read requests into word addresses and sends them to
// the on-chip ROM or, when the control cycle was started with ext set, to the
// off-chip KBM bus. The word comes back one clock later and is put on the
// 15-bit ROM bus for the controller, fuzzifier, rule decoder and inference.
//   KBM_KBD : word w of the descriptor of knowledge base kb, at 4*kb + w
//   KBM_DIR : IMF directory word of segment in_idx[7:2], imf_base + segment;
//             it holds the start of that segment's four IMF tables
//   KBM_IMF : IMF table entry of lane in_idx[1:0] at value in_val,
//             imf_base + 256*lane + in_val, with imf_base now the segment's
//             table start (the input value comes over the internal data bus)
//   KBM_SR  : rule segment word, sr_base + sr_off
//   KBM_OMF : OMF table entry of output point x, 256*omf_page + x
// Addresses wrap at 2^15 words.
//
// The KBM interface, its two memory options and the data it receives (start
// information and inputs) are published; the address map and the one-clock
// synchronous read of both memories are this design's choice.
module fc_kbm_if
  import fc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  kbm_req_e   req,
  input  logic       ext_sel,
  input  logic [5:0] kb,
  input  logic [1:0] kbd_word,
  input  logic [7:0] in_idx,
  input  logic [7:0] in_val,
  input  kaddr_t     sr_off,
  input  logic [7:0] x,
  input  kaddr_t     imf_base,
  input  logic [6:0] omf_page,
  input  kaddr_t     sr_base,
  // on-chip ROM
  output logic       rom_en,
  output kaddr_t     rom_addr,
  input  kword_t     rom_data,
  // off-chip KBM bus
  output logic       ext_rd,
  output kaddr_t     ext_addr,
  input  kword_t     ext_data,
  // ROM bus
  output kword_t     bus
);
  kaddr_t addr;
  logic   sel_q;

  always_comb begin
    unique case (req)
      KBM_KBD: addr = KAW'({kb, kbd_word});
      KBM_DIR: addr = imf_base + KAW'(in_idx[7:2]);
      KBM_IMF: addr = imf_base + KAW'({in_idx[1:0], in_val});
      KBM_SR:  addr = sr_base + sr_off;
      KBM_OMF: addr = {omf_page, x};
      default: addr = '0;
    endcase
  end

  assign rom_en   = (req != KBM_NONE) && !ext_sel;
  assign ext_rd   = (req != KBM_NONE) &&  ext_sel;
  assign rom_addr = addr;
  assign ext_addr = ext_sel ? addr : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= 1'b0;
    else        sel_q <= ext_sel;
  end

  assign bus = sel_q ? ext_data : rom_data;
endmodule
