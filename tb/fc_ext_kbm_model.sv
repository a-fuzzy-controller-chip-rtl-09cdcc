// fc_ext_kbm_model: behavioural model of an off-chip knowledge base memory.
//
// A 32K x 15-bit memory with a synchronous read (word on data one clock after
// rd/addr), as the coprocessor's off-chip KBM bus expects, and a write port for
// the testbench to load it. Not part of the coprocessor.
module fc_ext_kbm_model
  import fc_pkg::*;
(
  input  logic   clk,
  input  logic   rd,
  input  kaddr_t addr,
  output kword_t data,
  input  logic   we,
  input  kaddr_t waddr,
  input  kword_t wdata
);
  kword_t mem [1 << KAW];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd) data <= mem[addr];
  end
endmodule
