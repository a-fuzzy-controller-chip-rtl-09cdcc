// fc_fuzzifier: holds the hit input membership functions of one rule segment.
//
// For every input the host sends, the KBM interface reads the input's IMF
// look-up entry, addressed by the input value; one clock later the entry is on
// the ROM bus and load/lane store it here. An entry names the first hit
// linguistic value, its grade, and whether the next value is hit too (with the
// complementary grade), so the overlap is at most two as published. Four lanes
// are kept, the four inputs a rule segment reads in parallel.
//
// Interface: load, lane, entry (ROM bus) in; fz[0..3] out, valid from the
// clock after the load. Lanes reset to "no value hit".
module fc_fuzzifier
  import fc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [1:0]            lane,
  input  kword_t                entry,
  output mf_entry_t [LANES-1:0] fz
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fz <= '0;
    end else if (load) begin
      fz[lane] <= mf_entry_t'(entry);
    end
  end
endmodule
