// fc_defuzzifier: crisp output by run-time integration over the output range.
//
// The inference sweep presents one output point x = 0 .. 2^RO-1 per clock with
// the fuzzy output value mu(x). For Centre of Gravity the defuzzifier adds up
// sum(mu) and sum(x*mu); for Mean of Maxima it tracks the largest mu seen, the
// sum of the points where it occurs and their count. first marks x = 0 and
// restarts the sums. start (the clock after the last point) launches the
// division sum(x*mu)/sum(mu) or sum(x)/count in fc_divider, which takes RO+1
// clocks; in the last of them done is high and result holds the rounded crisp
// value. A fuzzy output that is zero everywhere gives the crisp value 0.
//
// So one output costs 2^RO + RO + 1 clocks, the inference and division terms
// of the published timing equation. CoG and MoM are published; the
// accumulator organisation, the rounding and the all-zero rule are this
// design's choice.
module fc_defuzzifier
  import fc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acc,      // a valid output point this clock
  input  logic          first,    // it is x = 0
  input  logic [RO-1:0] x,
  input  grade_t        mu,
  input  logic          mom,      // 1 = Mean of Maxima, 0 = Centre of Gravity
  input  logic          start,
  output logic          busy,
  output logic          done,
  output grade_t        result
);
  localparam int unsigned S0W = RO + DW;        // sum of mu
  localparam int unsigned S1W = RO + RO + DW;   // sum of x*mu
  localparam int unsigned SXW = RO + RO;        // sum of x at the maxima
  localparam int unsigned CNW = RO + 1;         // count of maxima

  logic [S0W-1:0] s0;
  logic [S1W-1:0] s1;
  logic [SXW-1:0] mx_sum;
  logic [CNW-1:0] mx_cnt;
  grade_t         mx_val;
  logic           zero_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0     <= '0;
      s1     <= '0;
      mx_sum <= '0;
      mx_cnt <= '0;
      mx_val <= '0;
    end else if (acc) begin
      if (first) begin
        s0     <= S0W'(mu);
        s1     <= S1W'(x) * S1W'(mu);
        mx_val <= mu;
        mx_sum <= SXW'(x);
        mx_cnt <= CNW'(1);
      end else begin
        s0 <= s0 + S0W'(mu);
        s1 <= s1 + S1W'(x) * S1W'(mu);
        if (mu > mx_val) begin
          mx_val <= mu;
          mx_sum <= SXW'(x);
          mx_cnt <= CNW'(1);
        end else if (mu == mx_val) begin
          mx_sum <= mx_sum + SXW'(x);
          mx_cnt <= mx_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     zero_q <= 1'b0;
    else if (start) zero_q <= (s0 == '0);
  end

  logic [S1W-1:0] num;
  logic [S0W:0]   den;
  grade_t         quot;

  assign num = mom ? S1W'(mx_sum) : s1;
  assign den = mom ? (S0W+1)'(mx_cnt) : (S0W+1)'(s0);

  fc_divider #(.RO(RO), .NUM_W(S1W), .DEN_W(S0W + 1)) u_div (
    .clk, .rst_n, .start, .num, .den, .busy, .done, .quot
  );

  // zero_q is loaded at start; for RO >= 1 done comes later, so it is valid.
  assign result = zero_q ? '0 : quot;
endmodule
