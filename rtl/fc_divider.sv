// fc_divider: rounded quotient in RO+1 clocks for the defuzzifier.
//
// Computes round(num/den) for quotients below 2^RO by restoring division of
// 2*num, one quotient bit per clock, RO+1 bits, the last bit being the one
// used for rounding. The first bit is formed in the start clock from the
// operands, so the quotient is presented, with done high, during the RO+1-th
// clock counted from start. The caller must keep num/den below 2^RO + 1/2
// (true for a centre of gravity or a mean of output points); larger quotients
// saturate to 2^RO-1.
//
// The RO+1 clock division time is that of the published timing equation; the
// restoring method and the rounding are this design's choice.
module fc_divider #(
  parameter int unsigned RO    = 8,
  parameter int unsigned NUM_W = 24,
  parameter int unsigned DEN_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [RO-1:0]    quot
);
  localparam int unsigned RW = NUM_W + 1;          // width of 2*num
  localparam int unsigned DW = DEN_W + RO + 1;     // width of shifted divisor
  localparam int unsigned WW = (RW > DW) ? RW : DW;
  localparam int unsigned CW = $clog2(RO + 2);

  logic [WW-1:0] rem_q, dsh_q, rem_in, dsh_in, rem_nx, dsh_nx;
  logic [RO:0]   q_q, q_in, q_nx;
  logic [CW-1:0] cnt;
  logic          bit_nx;

  always_comb begin
    if (start) begin
      rem_in = WW'({num, 1'b0});
      dsh_in = WW'(den) << RO;
      q_in   = '0;
    end else begin
      rem_in = rem_q;
      dsh_in = dsh_q;
      q_in   = q_q;
    end
    bit_nx = (rem_in >= dsh_in);
    rem_nx = bit_nx ? rem_in - dsh_in : rem_in;
    dsh_nx = dsh_in >> 1;
    q_nx   = {q_in[RO-1:0], bit_nx};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      rem_q <= '0;
      dsh_q <= '0;
      q_q   <= '0;
    end else if (start || busy) begin
      rem_q <= rem_nx;
      dsh_q <= dsh_nx;
      q_q   <= q_nx;
      cnt   <= start ? CW'(1) : cnt + 1'b1;
      busy  <= !(busy && cnt == CW'(RO));
    end
  end

  // Quotient bit count reaches RO+1 in the clock where done is high.
  logic [RO+1:0] rounded;
  assign done    = busy && (cnt == CW'(RO));
  assign rounded = ({1'b0, q_nx} + 1'b1) >> 1;
  assign quot    = rounded[RO] ? '1 : rounded[RO-1:0];
endmodule
