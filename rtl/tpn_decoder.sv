// tpn_decoder: thread-per-node, multi-kernel min-sum decoder for an
// arbitrary (not necessarily quasi-cyclic) binary LDPC code. It mirrors the
// multi-kernel organization: a check-node (CN) kernel visits every CN and a
// variable-node (VN) kernel visits every VN, each kernel is launched once
// per iteration over all of its nodes (work-items) and is completely
// flushed before the other kernel starts. Each work-item loads all the
// messages of its node from the shared edge memory, updates them and
// stores them back.
//
// Memory: edges are numbered in VN order (the edges of VN 0, then of VN 1,
// ...); the edge memory holds one message per edge. The VN kernel walks the
// edges in that order, using vn_last (loaded through cfg_vn_*) to find the
// end of each VN. The CN kernel walks a list of edge numbers in CN order,
// each with a last-of-CN flag (cfg_cn_*). Channel LLRs are written through
// llr_* (one per VN); decisions are read through dec_addr/dec_data.
//
// Datapath: the serial cn_unit (min-sum, Eq. (2)) and vn_unit (sum and
// subtract, Eqs. (3)-(4)) of the dataflow decoder, one message per cycle. A
// decode is one VN pass with the CN-to-VN messages forced to zero (it
// initializes every variable-to-check message with the channel LLR), then
// num_iter times a CN pass followed by a VN pass; the last VN pass writes
// the hard decisions.
//
// Timing: one edge per cycle is issued. Stage A reads the order tables,
// stage 1 reads the edge and LLR memories and feeds the kernel's unit; a tag
// queue gives each result its write-back edge and VN. A pass over E edges
// takes E cycles plus a drain of at most about 2*DV_MAX + 8 cycles, so a
// decode takes about (2I+1)(E + drain) cycles. kernel_start pulses at the
// start of every pass, kernel_cn says which kernel it is, done pulses once
// at the end.
//
// What follows the original design: the node-level kernels, the per-pass
// flush, the min-sum update. This design's choices: one work-item in flight
// per kernel at a time (a serial unit instead of an OpenCL compute unit),
// the on-chip edge memory in place of DRAM, message widths and the initial
// VN pass.
module tpn_decoder #(
  parameter int unsigned N      = 1944,
  parameter int unsigned E      = 7776,
  parameter int unsigned DC_MAX = 8,
  parameter int unsigned DV_MAX = 11,
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned SUM_W  = ldpc_pkg::SUM_W,
  parameter int unsigned ITER_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  // order tables
  input  logic                    cfg_cn_we,
  input  logic [$clog2(E)-1:0]    cfg_cn_addr,
  input  logic [$clog2(E)-1:0]    cfg_cn_edge,
  input  logic                    cfg_cn_last,
  input  logic                    cfg_vn_we,
  input  logic [$clog2(E)-1:0]    cfg_vn_addr,
  input  logic                    cfg_vn_last,
  // channel LLRs
  input  logic                    llr_we,
  input  logic [$clog2(N)-1:0]    llr_addr,
  input  logic [MSG_W-1:0]        llr_data,
  // control
  input  logic [$clog2(E+1)-1:0]  num_edges,
  input  logic [ITER_W-1:0]       num_iter,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    kernel_start,
  output logic                    kernel_cn,
  output logic [ITER_W-1:0]       iter,
  // decisions
  input  logic [$clog2(N)-1:0]    dec_addr,
  output logic                    dec_data
);
  localparam int unsigned EW = $clog2(E);
  localparam int unsigned VW = $clog2(N);
  localparam int unsigned DMAX = (DC_MAX > DV_MAX) ? DC_MAX : DV_MAX;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_e;
  typedef struct packed {
    logic [EW-1:0] e;
    logic [VW-1:0] v;
  } tag_t;

  state_e        state;
  logic          cn_pass, zero_pass;
  logic [EW-1:0] t;

  wire issue     = (state == S_ISSUE);
  wire last_addr = (32'(t) + 1 >= 32'(num_edges));

  // ---------------- stage A: order tables ----------------
  logic [EW:0]   cn_rd;
  logic [0:0]    vn_rd;
  logic          a_valid;
  logic [EW-1:0] a_t;

  df_bank #(.WIDTH(EW + 1), .DEPTH(E)) u_cn_tab (
    .clk, .rd_en(issue), .rd_addr(t), .rd_data(cn_rd),
    .wr_en(cfg_cn_we), .wr_addr(cfg_cn_addr), .wr_data({cfg_cn_edge, cfg_cn_last})
  );
  df_bank #(.WIDTH(1), .DEPTH(E)) u_vn_tab (
    .clk, .rd_en(issue), .rd_addr(t), .rd_data(vn_rd),
    .wr_en(cfg_vn_we), .wr_addr(cfg_vn_addr), .wr_data(cfg_vn_last)
  );

  logic [EW-1:0] a_e;
  logic          a_last;
  assign a_e    = cn_pass ? cn_rd[EW:1] : a_t;
  assign a_last = cn_pass ? cn_rd[0]    : vn_rd[0];

  // ---------------- stage 1: edge and LLR memories ----------------
  logic          prev_last;
  logic [VW-1:0] vcnt;
  logic          s1_valid, s1_first, s1_last;
  logic [EW-1:0] s1_e;
  logic [VW-1:0] s1_v;
  logic [MSG_W-1:0] edge_rd, llr_rd;

  // write-back side
  logic             out_valid;
  logic [MSG_W-1:0] out_msg;
  logic             tag_empty;
  tag_t             tag_head;
  wire drained = !a_valid && !s1_valid && tag_empty && !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cn_pass      <= 1'b0;
      zero_pass    <= 1'b0;
      t            <= '0;
      iter         <= '0;
      kernel_start <= 1'b0;
    end else begin
      kernel_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state        <= S_ISSUE;
          cn_pass      <= 1'b0;
          zero_pass    <= 1'b1;
          iter         <= '0;
          t            <= '0;
          kernel_start <= 1'b1;
        end
        S_ISSUE: begin
          t <= t + 1'b1;
          if (last_addr) state <= S_WAIT;
        end
        S_WAIT: if (drained) begin
          t         <= '0;
          zero_pass <= 1'b0;
          if (!cn_pass && iter == num_iter) begin
            state <= S_DONE;
          end else begin
            state        <= S_ISSUE;
            kernel_start <= 1'b1;
            cn_pass      <= !cn_pass;
            if (cn_pass) iter <= iter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign kernel_cn = cn_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid   <= 1'b0;
      a_t       <= '0;
      prev_last <= 1'b1;
      vcnt      <= '0;
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_e      <= '0;
      s1_v      <= '0;
    end else begin
      a_valid  <= issue;
      a_t      <= t;
      s1_valid <= a_valid;
      s1_first <= prev_last;
      s1_last  <= a_last;
      s1_e     <= a_e;
      s1_v     <= vcnt;
      if (a_valid) begin
        prev_last <= a_last;
        if (a_last) vcnt <= vcnt + 1'b1;
      end else if (state == S_WAIT && drained) begin
        prev_last <= 1'b1;
        vcnt      <= '0;
      end
    end
  end

  df_bank #(.WIDTH(MSG_W), .DEPTH(E)) u_edge_mem (
    .clk, .rd_en(a_valid), .rd_addr(a_e), .rd_data(edge_rd),
    .wr_en(out_valid), .wr_addr(tag_head.e), .wr_data(out_msg)
  );
  df_bank #(.WIDTH(MSG_W), .DEPTH(N)) u_llr_mem (
    .clk, .rd_en(a_valid), .rd_addr(vcnt), .rd_data(llr_rd),
    .wr_en(llr_we), .wr_addr(llr_addr), .wr_data(llr_data)
  );

  // ---------------- kernels ----------------
  logic                    cn_ov, cn_ol, vn_ov, vn_ol;
  logic signed [MSG_W-1:0] cn_om, vn_om;
  logic signed [SUM_W-1:0] vn_app;

  cn_unit #(.MSG_W(MSG_W), .DC_MAX(DC_MAX)) u_cn (
    .clk, .rst_n,
    .in_valid(s1_valid && cn_pass), .in_msg(edge_rd), .in_last(s1_last),
    .out_valid(cn_ov), .out_msg(cn_om), .out_last(cn_ol)
  );
  vn_unit #(.MSG_W(MSG_W), .SUM_W(SUM_W), .DV_MAX(DV_MAX)) u_vn (
    .clk, .rst_n,
    .in_valid(s1_valid && !cn_pass), .in_msg(zero_pass ? '0 : edge_rd), .in_llr(llr_rd),
    .in_first(s1_first), .in_last(s1_last),
    .out_valid(vn_ov), .out_msg(vn_om), .out_app(vn_app), .out_last(vn_ol)
  );

  assign out_valid = cn_ov || vn_ov;
  assign out_msg   = cn_ov ? cn_om : vn_om;

  msg_fifo #(.WIDTH($bits(tag_t)), .DEPTH(2 * DMAX + 6)) u_tags (
    .clk, .rst_n,
    .push(s1_valid), .wr_data(tag_t'{e: s1_e, v: s1_v}),
    .pop(out_valid), .rd_data(tag_head), .empty(tag_empty), .full(), .count()
  );

  df_bank #(.WIDTH(1), .DEPTH(N)) u_dec_mem (
    .clk, .rd_en(1'b1), .rd_addr(dec_addr), .rd_data(dec_data),
    .wr_en(vn_ov && vn_ol), .wr_addr(tag_head.v), .wr_data(vn_app[SUM_W-1])
  );

  a_one_kernel: assert property (@(posedge clk) disable iff (!rst_n) !(cn_ov && vn_ov));
  a_cn_in_pass: assert property (@(posedge clk) disable iff (!rst_n) (cn_ov && cn_ol) |-> cn_pass);
  a_group_end:  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !tag_empty);

endmodule
