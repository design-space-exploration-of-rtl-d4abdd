// ldpc_hls_top: top level holding the two decoder architectures of this
// design side by side, each with its own port set:
//
//  * df_*  : the dataflow multi-FU binary min-sum decoder (df_decoder) for
//            quasi-cyclic codes such as the DVB-S2 code: LANES functional
//            units, streamed LLR input and decision output, double-buffered
//            frames, base-matrix tables loaded through the cfg ports.
//  * nb_*  : the loop-pipelined non-binary FFT-SPA decoder (nb_decoder) for a
//            regular (DV, DC) code over GF(2^M): coefficient and check-node
//            tables, channel pmfs written to memory, start/done control and
//            a decision read port.
//  * tpn_* : the thread-per-node multi-kernel min-sum decoder (tpn_decoder)
//            for arbitrary binary codes such as the 1944-bit WiFi code:
//            edge-order tables, LLR write port, start/done control and a
//            decision read port.
//
// The three share only clk and rst_n (active-low, asynchronous assert). All
// ports are plain signals; see df_decoder and nb_decoder for timing. The
// parameter defaults are the sizes of the reference workloads: a
// 360-lane decoder for the 64800-bit DVB-S2 code (180 x 360 columns, at most
// 630 nonzero 360x360 circulants), GF(16) with 384 symbols (1536 bits) and
// a 1944-bit code with at most 972 x 8 edges.
// Placing all three in one top is this design's choice; originally each runs on
// its own platform.
//
// Lint note: verilator reports rst_n as used both synchronously and
// asynchronously (SYNCASYNCNET). All flip-flops reset asynchronously; the
// synchronous use is only the 'disable iff (!rst_n)' of the assertions.
module ldpc_hls_top #(
  parameter int unsigned LANES  = 360,
  parameter int unsigned NB     = 180,
  parameter int unsigned EB     = 630,
  parameter int unsigned DC_MAX = 7,
  parameter int unsigned DV_MAX = 8,
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned ITER_W = 6,
  parameter int unsigned NB_M    = 4,
  parameter int unsigned NB_DV   = 2,
  parameter int unsigned NB_DC   = 3,
  parameter int unsigned NB_NSYM = 384,
  parameter int unsigned NB_FW   = 18,
  parameter int unsigned TPN_N      = 1944,
  parameter int unsigned TPN_E      = 7776,
  parameter int unsigned TPN_DC_MAX = 8,
  parameter int unsigned TPN_DV_MAX = 11
) (
  input  logic clk,
  input  logic rst_n,
  // ---------------- binary dataflow decoder ----------------
  input  logic                        df_cfg_ent_we,
  input  logic [$clog2(EB)-1:0]       df_cfg_ent_addr,
  input  logic [$clog2(NB)-1:0]       df_cfg_ent_col,
  input  logic [$clog2(LANES)-1:0]    df_cfg_ent_shift,
  input  logic                        df_cfg_ent_row_last,
  input  logic                        df_cfg_col_we,
  input  logic [$clog2(EB)-1:0]       df_cfg_col_addr,
  input  logic [$clog2(EB)-1:0]       df_cfg_col_k,
  input  logic                        df_cfg_col_last,
  input  logic [$clog2(EB+1)-1:0]     df_num_edges,
  input  logic [$clog2(NB+1)-1:0]     df_num_cols,
  input  logic [ITER_W-1:0]           df_num_iter,
  input  logic                        df_in_valid,
  output logic                        df_in_ready,
  input  logic [LANES-1:0][MSG_W-1:0] df_in_data,
  output logic                        df_out_valid,
  input  logic                        df_out_ready,
  output logic [LANES-1:0]            df_out_data,
  output logic                        df_out_last,
  output logic                        df_core_busy,
  output logic                        df_core_done,
  output logic                        df_phase_start,
  output logic                        df_phase_vn,
  output logic [ITER_W-1:0]           df_iter,
  output logic [1:0]                  df_llr_full,
  output logic [1:0]                  df_dec_full,
  // ---------------- non-binary decoder ----------------
  input  logic                                  nb_cfg_h_we,
  input  logic [$clog2(NB_NSYM*NB_DV)-1:0]      nb_cfg_h_addr,
  input  logic [NB_M-1:0]                       nb_cfg_h,
  input  logic                                  nb_cfg_cn_we,
  input  logic [$clog2(NB_NSYM*NB_DV)-1:0]      nb_cfg_cn_addr,
  input  logic [$clog2(NB_NSYM*NB_DV)-1:0]      nb_cfg_cn_edge,
  input  logic                                  nb_mv_we,
  input  logic [$clog2(NB_NSYM)-1:0]            nb_mv_addr,
  input  logic [(1<<NB_M)-1:0][NB_FW-1:0]       nb_mv_data,
  input  logic [ITER_W-1:0]                     nb_num_iter,
  input  logic                                  nb_start,
  output logic                                  nb_busy,
  output logic                                  nb_done,
  output logic                                  nb_phase_start,
  output logic                                  nb_phase_cn,
  output logic [ITER_W-1:0]                     nb_iter,
  input  logic [$clog2(NB_NSYM)-1:0]            nb_dec_addr,
  output logic [NB_M-1:0]                       nb_dec_data,
  // ---------------- thread-per-node decoder ----------------
  input  logic                                  tpn_cfg_cn_we,
  input  logic [$clog2(TPN_E)-1:0]              tpn_cfg_cn_addr,
  input  logic [$clog2(TPN_E)-1:0]              tpn_cfg_cn_edge,
  input  logic                                  tpn_cfg_cn_last,
  input  logic                                  tpn_cfg_vn_we,
  input  logic [$clog2(TPN_E)-1:0]              tpn_cfg_vn_addr,
  input  logic                                  tpn_cfg_vn_last,
  input  logic                                  tpn_llr_we,
  input  logic [$clog2(TPN_N)-1:0]              tpn_llr_addr,
  input  logic [MSG_W-1:0]                      tpn_llr_data,
  input  logic [$clog2(TPN_E+1)-1:0]            tpn_num_edges,
  input  logic [ITER_W-1:0]                     tpn_num_iter,
  input  logic                                  tpn_start,
  output logic                                  tpn_busy,
  output logic                                  tpn_done,
  output logic                                  tpn_kernel_start,
  output logic                                  tpn_kernel_cn,
  output logic [ITER_W-1:0]                     tpn_iter,
  input  logic [$clog2(TPN_N)-1:0]              tpn_dec_addr,
  output logic                                  tpn_dec_data
);
  ldpc_pkg::fu_mode_e df_mode;

  df_decoder #(
    .LANES(LANES), .NB(NB), .EB(EB), .DC_MAX(DC_MAX), .DV_MAX(DV_MAX),
    .MSG_W(MSG_W), .ITER_W(ITER_W)
  ) u_df (
    .clk, .rst_n,
    .cfg_ent_we(df_cfg_ent_we), .cfg_ent_addr(df_cfg_ent_addr), .cfg_ent_col(df_cfg_ent_col),
    .cfg_ent_shift(df_cfg_ent_shift), .cfg_ent_row_last(df_cfg_ent_row_last),
    .cfg_col_we(df_cfg_col_we), .cfg_col_addr(df_cfg_col_addr), .cfg_col_k(df_cfg_col_k),
    .cfg_col_last(df_cfg_col_last),
    .num_edges(df_num_edges), .num_cols(df_num_cols), .num_iter(df_num_iter),
    .in_valid(df_in_valid), .in_ready(df_in_ready), .in_data(df_in_data),
    .out_valid(df_out_valid), .out_ready(df_out_ready), .out_data(df_out_data),
    .out_last(df_out_last),
    .core_busy(df_core_busy), .core_done(df_core_done), .phase_start(df_phase_start),
    .phase_mode(df_mode), .iter(df_iter), .llr_full(df_llr_full), .dec_full(df_dec_full)
  );
  assign df_phase_vn = (df_mode == ldpc_pkg::MODE_VN);

  nb_decoder #(
    .M(NB_M), .DV(NB_DV), .DC(NB_DC), .NSYM(NB_NSYM), .FW(NB_FW), .ITER_W(ITER_W)
  ) u_nb (
    .clk, .rst_n,
    .cfg_h_we(nb_cfg_h_we), .cfg_h_addr(nb_cfg_h_addr), .cfg_h(nb_cfg_h),
    .cfg_cn_we(nb_cfg_cn_we), .cfg_cn_addr(nb_cfg_cn_addr), .cfg_cn_edge(nb_cfg_cn_edge),
    .mv_we(nb_mv_we), .mv_addr(nb_mv_addr), .mv_data(nb_mv_data),
    .num_iter(nb_num_iter), .start(nb_start), .busy(nb_busy), .done(nb_done),
    .phase_start(nb_phase_start), .phase_cn(nb_phase_cn), .iter(nb_iter),
    .dec_addr(nb_dec_addr), .dec_data(nb_dec_data)
  );

  tpn_decoder #(
    .N(TPN_N), .E(TPN_E), .DC_MAX(TPN_DC_MAX), .DV_MAX(TPN_DV_MAX), .MSG_W(MSG_W), .ITER_W(ITER_W)
  ) u_tpn (
    .clk, .rst_n,
    .cfg_cn_we(tpn_cfg_cn_we), .cfg_cn_addr(tpn_cfg_cn_addr), .cfg_cn_edge(tpn_cfg_cn_edge),
    .cfg_cn_last(tpn_cfg_cn_last), .cfg_vn_we(tpn_cfg_vn_we), .cfg_vn_addr(tpn_cfg_vn_addr),
    .cfg_vn_last(tpn_cfg_vn_last), .llr_we(tpn_llr_we), .llr_addr(tpn_llr_addr), .llr_data(tpn_llr_data),
    .num_edges(tpn_num_edges), .num_iter(tpn_num_iter), .start(tpn_start), .busy(tpn_busy),
    .done(tpn_done), .kernel_start(tpn_kernel_start), .kernel_cn(tpn_kernel_cn), .iter(tpn_iter),
    .dec_addr(tpn_dec_addr), .dec_data(tpn_dec_data)
  );
endmodule
