// fc_rom: on-chip knowledge base memory, 15-bit words.
//
// Holds the knowledge base descriptors, membership function tables and rule
// sets of an application. On silicon this is a mask ROM; here it is a memory
// array with a synchronous read port (data one clock after the address) and a
// write port, prog_*, that stands for the mask programming: it is used to load
// the application's contents before the first control cycle and is not driven
// in operation.
//
// Depth: 32K words of 15 bits (about 60 KiB), the nearest to the published
// 64 kB maximum that a 15-bit word address reaches; the 15-bit word follows
// the published bus width, the read latency is this design's choice.
module fc_rom
  import fc_pkg::*;
#(
  parameter int unsigned DEPTH = 32768
) (
  input  logic   clk,
  input  logic   rd_en,
  input  kaddr_t rd_addr,
  output kword_t rd_data,
  input  logic   prog_we,
  input  kaddr_t prog_addr,
  input  kword_t prog_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  kword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW-1:0]] <= prog_data;
    if (rd_en)   rd_data <= mem[rd_addr[AW-1:0]];
  end
endmodule
