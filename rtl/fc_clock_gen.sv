// fc_clock_gen: system clock and reset for the fuzzy coprocessor.
//
// The chip runs from a crystal of up to 20 MHz while its system clock period is
// 100 ns, so the system clock is the crystal clock divided by two (DIV = 2).
// A counter toggles sys_clk every DIV/2 crystal cycles. The external reset is
// asserted asynchronously (and at every crystal edge while rst_n is low, since
// sys_clk is held during reset) and released synchronously: sys_rst_n rises
// with the second falling edge of sys_clk after rst_n has risen, half a system
// clock away from any rising edge.
//
// Interface: clk_xtal, rst_n in; sys_clk, sys_rst_n out.
// The division ratio follows from the published crystal frequency and clock
// period; the reset synchroniser is this design's own addition.
module fc_clock_gen #(
  parameter int unsigned DIV = 2   // even division ratio, crystal to system clock
) (
  input  logic clk_xtal,
  input  logic rst_n,
  output logic sys_clk,
  output logic sys_rst_n
);
  localparam int unsigned HALF = (DIV < 2) ? 1 : DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;
  logic [1:0]    rst_sync;

  always_ff @(posedge clk_xtal or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      sys_clk <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      sys_clk <= ~sys_clk;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

  logic fall;
  assign fall = (cnt == CW'(HALF - 1)) && sys_clk;

  always_ff @(posedge clk_xtal or negedge rst_n) begin
    if (!rst_n)    rst_sync <= 2'b00;
    else if (fall) rst_sync <= {rst_sync[0], 1'b1};
  end

  assign sys_rst_n = rst_sync[1];
endmodule
