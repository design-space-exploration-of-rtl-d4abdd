// vn_unit: serial variable-node (VN) datapath of a functional unit. For each
// VN it forms the a-posteriori LLR L(M_v) = L(m_v) + sum of the incoming CN
// messages, and then each outgoing message L(M_v) - L(m_cv) (the incoming
// message on the same edge is removed).
//
// Messages of one VN arrive one per cycle (in_valid); in_first marks the
// first, which also carries the channel LLR in_llr, and in_last the last.
// An accumulator register sums them while they are queued in a FIFO. At the
// last input the sum is queued as the VN's result; the output side then pops
// one message per cycle and emits the saturated difference, together with the
// a-posteriori value out_app (its sign is the hard decision). Outputs of a VN
// of degree d start the cycle after its last input and the next VN can be
// loaded meanwhile, so the throughput is one message per cycle.
//
// MSG_W-bit signed messages, SUM_W-bit signed a-posteriori sum (saturating);
// outputs are registered. Widths and FIFO depths (2*DV_MAX messages, DV_MAX
// results) are this design's choice.
module vn_unit #(
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned SUM_W  = ldpc_pkg::SUM_W,
  parameter int unsigned DV_MAX = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [MSG_W-1:0] in_msg,
  input  logic signed [MSG_W-1:0] in_llr,
  input  logic                    in_first,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic signed [MSG_W-1:0] out_msg,
  output logic signed [SUM_W-1:0] out_app,
  output logic                    out_last
);
  localparam int unsigned SW1 = SUM_W + 1;
  localparam logic signed [SUM_W-1:0] SUM_MAX = {1'b0, {(SUM_W-1){1'b1}}};
  localparam logic signed [SUM_W-1:0] SUM_MIN = -SUM_MAX;
  localparam logic signed [SUM_W:0]   MSG_MAX = (1 <<< (MSG_W - 1)) - 1;

  typedef struct packed {
    logic signed [MSG_W-1:0] msg;
    logic                    last;
  } elem_t;

  function automatic logic signed [SUM_W-1:0] sat_sum(input logic signed [SUM_W:0] v);
    if (v > SW1'(SUM_MAX))      return SUM_MAX;
    else if (v < SW1'(SUM_MIN)) return SUM_MIN;
    else                            return SUM_W'(v);
  endfunction

  // ---------------- input side: accumulator ----------------
  logic signed [SUM_W-1:0] acc_q, acc_nxt;

  always_comb begin
    if (in_first) acc_nxt = sat_sum(SW1'(in_llr) + SW1'(in_msg));
    else          acc_nxt = sat_sum(SW1'(acc_q) + SW1'(in_msg));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc_q <= '0;
    else if (in_valid) acc_q <= acc_nxt;
  end

  // ---------------- queues ----------------
  elem_t                   d_head;
  logic signed [SUM_W-1:0] r_head;
  logic                    d_empty, r_empty, d_pop;

  msg_fifo #(.WIDTH($bits(elem_t)), .DEPTH(2 * DV_MAX)) u_data_fifo (
    .clk, .rst_n,
    .push(in_valid), .wr_data(elem_t'{msg: in_msg, last: in_last}),
    .pop(d_pop), .rd_data(d_head), .empty(d_empty), .full(), .count()
  );

  msg_fifo #(.WIDTH(SUM_W), .DEPTH(DV_MAX)) u_res_fifo (
    .clk, .rst_n,
    .push(in_valid && in_last), .wr_data(acc_nxt),
    .pop(d_pop && d_head.last), .rd_data(r_head), .empty(r_empty), .full(), .count()
  );

  // ---------------- output side: extrinsic message ----------------
  logic signed [SUM_W:0] diff;

  assign d_pop = !d_empty && !r_empty;
  assign diff  = SW1'(r_head) - SW1'(d_head.msg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_msg   <= '0;
      out_app   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= d_pop;
      out_app   <= r_head;
      out_last  <= d_pop && d_head.last;
      if (diff > MSG_MAX)       out_msg <= MSG_W'(MSG_MAX);
      else if (diff < -MSG_MAX) out_msg <= MSG_W'(-MSG_MAX);
      else                      out_msg <= MSG_W'(diff);
    end
  end

endmodule
