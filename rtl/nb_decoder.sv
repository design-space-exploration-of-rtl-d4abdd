// nb_decoder: non-binary LDPC decoder over GF(2^M) running the FFT-based
// sum-product algorithm (FFT-SPA) on a regular code with DV edges per
// variable node (VN) and DC edges per check node (CN). It is organized as a
// set of loops over the graph, each pipelined to take one pmf per cycle,
// with the loop over the Q = 2^M field symbols fully unrolled and every
// memory word holding a whole pmf (Q values side by side), so one read or
// write moves one pmf.
//
// Memories: the channel pmfs m_v(x) (NSYM words), the edge memory (NSYM*DV
// words, edge e = v*DV + i is the i-th edge of VN v) and the symbol
// decisions. Tables written through cfg_*: the GF coefficient h of every
// edge, and the CN-order edge list (entry c*DC + i is the edge index of the
// i-th edge of CN c).
//
// A decode is one VN pass with uniform CN messages, then num_iter times a CN
// pass and a VN pass. VN pass: edges are read in order; nb_vn_unit forms the
// outgoing pmfs; each is permuted by h (gf_perm), transformed (fwht) and
// written back in place, and the VN's decision is stored. CN pass: edges
// are read in CN order; nb_cn_unit forms the products in the transform
// domain; each is transformed back (fwht, divided by Q, negatives cleared),
// depermuted and written back in place. A tag queue gives each result the
// address it was read from. Each pass waits for the pipeline to drain, and
// lasts about NSYM*DV + 8 cycles.
//
// Host interface: load the channel pmfs (mv_*), set the tables, pulse start,
// wait for done, read the decided symbols (dec_addr -> dec_data one cycle
// later).
module nb_decoder #(
  parameter int unsigned M      = 4,
  parameter int unsigned DV     = 2,
  parameter int unsigned DC     = 3,
  parameter int unsigned NSYM   = 384,
  parameter int unsigned FW     = 18,
  parameter int unsigned ITER_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  // tables
  input  logic                                   cfg_h_we,
  input  logic [$clog2(NSYM*DV)-1:0]             cfg_h_addr,
  input  logic [M-1:0]                           cfg_h,
  input  logic                                   cfg_cn_we,
  input  logic [$clog2(NSYM*DV)-1:0]             cfg_cn_addr,
  input  logic [$clog2(NSYM*DV)-1:0]             cfg_cn_edge,
  // channel pmfs
  input  logic                                   mv_we,
  input  logic [$clog2(NSYM)-1:0]                mv_addr,
  input  logic [(1<<M)-1:0][FW-1:0]              mv_data,
  // control
  input  logic [ITER_W-1:0]                      num_iter,
  input  logic                                   start,
  output logic                                   busy,
  output logic                                   done,
  output logic                                   phase_start,
  output logic                                   phase_cn,
  output logic [ITER_W-1:0]                      iter,
  // decisions
  input  logic [$clog2(NSYM)-1:0]                dec_addr,
  output logic [M-1:0]                           dec_data
);
  localparam int unsigned Q  = 1 << M;
  localparam int unsigned E  = NSYM * DV;
  localparam int unsigned EW = $clog2(E);
  localparam int unsigned VW = $clog2(NSYM);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_e;
  typedef struct packed {
    logic [EW-1:0] e;
    logic [VW-1:0] v;
  } tag_t;

  // ---------------- tables ----------------
  logic [M-1:0]  h_tab  [E];
  logic [EW-1:0] cn_tab [E];

  always_ff @(posedge clk) begin
    if (cfg_h_we)  h_tab[cfg_h_addr]   <= cfg_h;
    if (cfg_cn_we) cn_tab[cfg_cn_addr] <= cfg_cn_edge;
  end

  // ---------------- sequencer ----------------
  state_e        state;
  logic          zero_phase;
  logic [EW-1:0] t;
  logic [VW-1:0] vcnt;
  logic [$clog2(DV+1)-1:0] dcnt;

  logic          s0_valid, s1_valid;
  logic [EW-1:0] s0_e, s1_e;
  logic [VW-1:0] s0_v, s1_v;

  logic          tag_empty;
  tag_t          tag_head;
  logic          vn_ov, vn_ol, cn_ov, cn_ol;
  logic [M-1:0]  vn_dec;

  wire out_valid = vn_ov || cn_ov;
  wire drained   = !s0_valid && !s1_valid && tag_empty && !out_valid;
  wire issue     = (state == S_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase_cn    <= 1'b0;
      zero_phase  <= 1'b0;
      t           <= '0;
      vcnt        <= '0;
      dcnt        <= '0;
      iter        <= '0;
      phase_start <= 1'b0;
    end else begin
      phase_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_ISSUE;
          phase_cn    <= 1'b0;
          zero_phase  <= 1'b1;
          iter        <= '0;
          t           <= '0;
          vcnt        <= '0;
          dcnt        <= '0;
          phase_start <= 1'b1;
        end
        S_ISSUE: begin
          t <= t + 1'b1;
          if (dcnt == ($clog2(DV+1))'(DV - 1)) begin
            dcnt <= '0;
            vcnt <= vcnt + 1'b1;
          end else begin
            dcnt <= dcnt + 1'b1;
          end
          if (t == EW'(E - 1)) state <= S_WAIT;
        end
        S_WAIT: if (drained) begin
          t          <= '0;
          vcnt       <= '0;
          dcnt       <= '0;
          zero_phase <= 1'b0;
          if (!phase_cn && iter == num_iter) begin
            state <= S_DONE;
          end else begin
            state       <= S_ISSUE;
            phase_start <= 1'b1;
            phase_cn    <= !phase_cn;
            if (phase_cn) iter <= iter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid <= 1'b0;
      s1_valid <= 1'b0;
      s0_e     <= '0;
      s1_e     <= '0;
      s0_v     <= '0;
      s1_v     <= '0;
    end else begin
      s0_valid <= issue;
      s0_e     <= phase_cn ? cn_tab[t] : t;
      s0_v     <= vcnt;
      s1_valid <= s0_valid;
      s1_e     <= s0_e;
      s1_v     <= s0_v;
    end
  end

  // ---------------- memories ----------------
  logic [Q-1:0][FW-1:0] edge_rd, mv_rd, edge_wr;
  logic                 edge_we;

  df_bank #(.WIDTH(Q * FW), .DEPTH(E)) u_edge_mem (
    .clk, .rd_en(s0_valid), .rd_addr(s0_e), .rd_data(edge_rd),
    .wr_en(edge_we), .wr_addr(tag_head.e), .wr_data(edge_wr)
  );

  df_bank #(.WIDTH(Q * FW), .DEPTH(NSYM)) u_mv_mem (
    .clk, .rd_en(s0_valid), .rd_addr(s0_v), .rd_data(mv_rd),
    .wr_en(mv_we), .wr_addr(mv_addr), .wr_data(mv_data)
  );

  df_bank #(.WIDTH(M), .DEPTH(NSYM)) u_dec_mem (
    .clk, .rd_en(1'b1), .rd_addr(dec_addr), .rd_data(dec_data),
    .wr_en(vn_ov && vn_ol), .wr_addr(tag_head.v), .wr_data(vn_dec)
  );

  // ---------------- node units ----------------
  logic signed [Q-1:0][FW-1:0] vn_out, cn_out;

  nb_vn_unit #(.M(M), .DV(DV), .FW(FW)) u_vn (
    .clk, .rst_n,
    .in_valid(s1_valid && !phase_cn), .in_msg(edge_rd), .in_mv(mv_rd), .in_zero(zero_phase),
    .out_valid(vn_ov), .out_msg(vn_out), .out_last(vn_ol), .out_dec(vn_dec)
  );

  nb_cn_unit #(.M(M), .DC(DC), .FW(FW)) u_cn (
    .clk, .rst_n,
    .in_valid(s1_valid && phase_cn), .in_msg(edge_rd),
    .out_valid(cn_ov), .out_msg(cn_out), .out_last(cn_ol)
  );

  msg_fifo #(.WIDTH($bits(tag_t)), .DEPTH(2 * (DV > DC ? DV : DC) + 4)) u_tags (
    .clk, .rst_n,
    .push(s1_valid), .wr_data(tag_t'{e: s1_e, v: s1_v}),
    .pop(out_valid), .rd_data(tag_head), .empty(tag_empty), .full(), .count()
  );

  // ---------------- edge post-processing ----------------
  // VN side: permute, then transform.  CN side: transform back, then depermute.
  logic signed [Q-1:0][FW-1:0]   vn_perm, cn_pmf, cn_deperm;
  logic signed [Q-1:0][FW+M-1:0] vn_f, cn_f;
  logic [M-1:0]                  h_cur;

  assign h_cur = h_tab[tag_head.e];

  gf_perm #(.M(M), .W(FW)) u_perm (.in(vn_out), .h(h_cur), .depermute(1'b0), .out(vn_perm));
  fwht    #(.M(M), .WI(FW)) u_fwht_vn (.in(vn_perm), .out(vn_f));
  fwht    #(.M(M), .WI(FW)) u_fwht_cn (.in(cn_out), .out(cn_f));

  always_comb begin
    for (int x = 0; x < Q; x++) begin
      logic signed [FW+M-1:0] p;
      p = $signed(cn_f[x]) >>> M;
      cn_pmf[x] = (p < 0) ? '0 : FW'(p);
    end
  end

  gf_perm #(.M(M), .W(FW)) u_deperm (.in(cn_pmf), .h(h_cur), .depermute(1'b1), .out(cn_deperm));

  always_comb begin
    edge_we = out_valid;
    for (int x = 0; x < Q; x++) edge_wr[x] = cn_ov ? cn_deperm[x] : FW'(vn_f[x]);
  end

  // every check node returns exactly DC results, the last one flagged
  logic [$clog2(DC+1)-1:0] cn_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cn_cnt <= '0;
    else if (cn_ov) cn_cnt <= cn_ol ? '0 : cn_cnt + 1'b1;
  end
  a_cn_group: assert property (@(posedge clk) disable iff (!rst_n)
    cn_ov |-> (cn_ol == (cn_cnt == $bits(cn_cnt)'(DC - 1))));

endmodule
