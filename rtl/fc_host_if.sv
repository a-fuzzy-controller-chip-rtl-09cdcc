// fc_host_if: microcontroller interface of the fuzzy coprocessor.
//
// The host sees two 8-bit registers on a bus with one address line, a = 0 the
// control register and a = 1 the data register.
//   Write control : start information {ie, ext, kb[5:0]}: interrupt enable,
//                   knowledge base memory off-chip, first knowledge base. It
//                   starts a control cycle (ignored while one is running).
//   Read control  : status {4'b0, busy, dr_full, out_rdy, ior}.
//   Write data    : next input value; clears IOR; dr_full until taken.
//   Read data     : crisp output; clears IOR and out_rdy.
// IOR (input/output requested) is set when the coprocessor wants the next four
// inputs (ior_set) and when the crisp output is ready (out_set, out_rdy also
// set). irq = ie & IOR, for hosts that do not poll.
//
// Bus timing (this design's choice): synchronous to clk; a write or a read
// strobe lasts one clock; rdata is combinational from the registers. The host
// must not write an input while dr_full is set. start_kb and start_ext are
// the write data itself, valid in the clock of the start strobe, so the
// controller sees the new start information at once without a second
// register.
// The two registers, the start information, the one-by-one input entry, the
// IOR flag and the interrupt are published; the bit assignment is not.
module fc_host_if
  import fc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host bus
  input  logic       cs,
  input  logic       wr,
  input  logic       rd,
  input  logic       a,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq,
  // internal data bus side
  output logic       start,
  output logic [5:0] start_kb,   // valid with start
  output logic       start_ext,  // valid with start
  output logic       in_valid,
  output logic [7:0] in_data,
  input  logic       in_ack,
  input  logic       ior_set,
  input  logic       out_set,
  input  grade_t     out_data,
  input  logic       busy
);
  logic       ie, ior, out_rdy, dr_full;
  logic [7:0] data_reg;
  logic       wr_ctrl, wr_data, rd_data;

  assign wr_ctrl = cs && wr && !a;
  assign wr_data = cs && wr &&  a;
  assign rd_data = cs && rd &&  a;

  assign start     = wr_ctrl && !busy;
  assign start_kb  = wdata[5:0];
  assign start_ext = wdata[6];
  assign in_valid = dr_full;
  assign in_data  = data_reg;
  assign irq      = ie && ior;
  assign rdata    = a ? data_reg : {4'b0, busy, dr_full, out_rdy, ior};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie        <= 1'b0;
      ior       <= 1'b0;
      out_rdy   <= 1'b0;
      dr_full   <= 1'b0;
      data_reg  <= '0;
    end else begin
      if (start) begin
        ie      <= wdata[7];
        ior     <= 1'b0;
        out_rdy <= 1'b0;
      end
      if (in_ack) dr_full <= 1'b0;
      if (wr_data) begin
        data_reg <= wdata;
        dr_full  <= 1'b1;
        ior      <= 1'b0;
      end
      if (rd_data && out_rdy) begin
        ior     <= 1'b0;
        out_rdy <= 1'b0;
      end
      if (ior_set) ior <= 1'b1;
      if (out_set) begin
        data_reg <= out_data;
        ior      <= 1'b1;
        out_rdy  <= 1'b1;
      end
    end
  end

  // Handshake rules of the host bus.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    wr_data |-> !dr_full || in_ack)
    else $error("host wrote an input before the previous one was taken");
  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n)
    in_ack |-> dr_full)
    else $error("input acknowledged with the data register empty");
endmodule
