// cn_unit: serial check-node (CN) datapath of a functional unit, computing the
// min-sum CN update: each outgoing message has the smallest magnitude of the
// other incoming messages of that CN and the product of their signs.
//
// Messages of one CN arrive one per cycle (in_valid), the last one flagged by
// in_last; consecutive CNs may follow back to back. A running "min FU" keeps
// the smallest magnitude, the second smallest, the position of the smallest
// and the XOR of the signs, while the inputs are queued in a FIFO. When the
// last input arrives, these four values are queued as the CN's result and the
// running state restarts for the next CN. The output side pops one queued
// message per cycle, once the result of its CN is known, and emits the second
// minimum for the position that held the minimum and the minimum otherwise,
// with the sign product excluding its own sign. So the outputs of a CN of
// degree d start the cycle after its last input and follow at one per cycle,
// while the next CN is loaded: throughput is one message per cycle.
//
// Interface: in_msg / out_msg are signed MSG_W-bit LLRs; inputs equal to
// -2^(MSG_W-1) are saturated to -(2^(MSG_W-1)-1). out_valid/out_msg/out_last
// are registered. A CN of degree 1 returns the largest magnitude. FIFO depths
// (2*DC_MAX messages, DC_MAX results) are this design's choice, sized so that
// back-to-back CNs of any degree up to DC_MAX never overflow.
module cn_unit #(
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned DC_MAX = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [MSG_W-1:0] in_msg,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic signed [MSG_W-1:0] out_msg,
  output logic                    out_last
);
  localparam int unsigned MAG_W = MSG_W - 1;
  localparam int unsigned POS_W = $clog2(DC_MAX + 1);
  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  typedef struct packed {
    logic signed [MSG_W-1:0] msg;
    logic                    last;
    logic [POS_W-1:0]        pos;
  } elem_t;

  typedef struct packed {
    logic [MAG_W-1:0] min1;
    logic [MAG_W-1:0] min2;
    logic [POS_W-1:0] idx1;
    logic             sgn;
  } cn_res_t;

  // ---------------- input side: running minimum search ----------------
  logic [MAG_W-1:0] min1_q, min2_q;
  logic [POS_W-1:0] idx1_q, pos_q;
  logic             sgn_q;

  logic signed [MSG_W-1:0] x;
  logic [MAG_W-1:0]        mag;
  cn_res_t                 nxt;

  always_comb begin
    x   = (in_msg == {1'b1, {(MSG_W-1){1'b0}}}) ? -$signed({1'b0, MAG_MAX}) : in_msg;
    mag = x[MSG_W-1] ? MAG_W'(-x) : MAG_W'(x);
    if (pos_q == '0) begin
      nxt.min1 = mag;
      nxt.min2 = MAG_MAX;
      nxt.idx1 = '0;
      nxt.sgn  = x[MSG_W-1];
    end else begin
      nxt.sgn = sgn_q ^ x[MSG_W-1];
      if (mag < min1_q) begin
        nxt.min1 = mag;
        nxt.min2 = min1_q;
        nxt.idx1 = pos_q;
      end else begin
        nxt.min1 = min1_q;
        nxt.min2 = (mag < min2_q) ? mag : min2_q;
        nxt.idx1 = idx1_q;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min1_q <= '0;
      min2_q <= '0;
      idx1_q <= '0;
      sgn_q  <= 1'b0;
      pos_q  <= '0;
    end else if (in_valid) begin
      min1_q <= nxt.min1;
      min2_q <= nxt.min2;
      idx1_q <= nxt.idx1;
      sgn_q  <= nxt.sgn;
      pos_q  <= in_last ? '0 : pos_q + 1'b1;
    end
  end

  // ---------------- queues ----------------
  elem_t   d_head;
  cn_res_t r_head;
  logic    d_empty, r_empty, d_pop, r_pop;

  msg_fifo #(.WIDTH($bits(elem_t)), .DEPTH(2 * DC_MAX)) u_data_fifo (
    .clk, .rst_n,
    .push(in_valid), .wr_data(elem_t'{msg: x, last: in_last, pos: pos_q}),
    .pop(d_pop), .rd_data(d_head), .empty(d_empty), .full(), .count()
  );

  msg_fifo #(.WIDTH($bits(cn_res_t)), .DEPTH(DC_MAX)) u_res_fifo (
    .clk, .rst_n,
    .push(in_valid && in_last), .wr_data(nxt),
    .pop(r_pop), .rd_data(r_head), .empty(r_empty), .full(), .count()
  );

  // ---------------- output side: min selection ----------------
  logic [MAG_W-1:0] omag;
  logic             osgn;

  assign d_pop = !d_empty && !r_empty;
  assign r_pop = d_pop && d_head.last;

  always_comb begin
    omag = (d_head.pos == r_head.idx1) ? r_head.min2 : r_head.min1;
    osgn = r_head.sgn ^ d_head.msg[MSG_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_msg   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= d_pop;
      out_msg   <= osgn ? -$signed({1'b0, omag}) : $signed({1'b0, omag});
      out_last  <= d_pop && d_head.last;
    end
  end

endmodule
