// df_decoder: dataflow binary LDPC decoder with an array of LANES functional
// units (FUs), running the min-sum algorithm (MSA) with a two-phase schedule
// on a quasi-cyclic parity-check matrix with LANES x LANES circulants (the
// number of FUs equals the circulant size, e.g. 360 for DVB-S2 normal frames).
//
// Structure: a stream manager (df_manager) loads channel LLRs into per-FU
// LLR banks and streams hard decisions out of per-FU decision banks, both
// double buffered. Each FU d owns a message bank (df_bank) holding the
// messages of the edges of check nodes row*LANES + d, one word per non-zero
// circulant. The controller (df_control) reads all banks at the same address
// each cycle; a cyclic shifter (the permutation network) rotates the read
// vector by the circulant's shift in VN phases, the FUs (df_fu) process one
// message per cycle each, and a second cyclic shifter rotates the results
// back before they are written to the address they came from.
//
// Interfaces: configuration of the base-matrix tables (cfg_*; see df_control)
// and of num_edges / num_cols / num_iter before the first frame; frame input
// stream of num_cols beats of LANES LLRs (in_*); output stream of num_cols
// beats of LANES hard-decision bits (out_*, out_last on the last beat).
// Decoding latency is about (2*num_iter + 1) * (num_edges + 2*DMAX + 4)
// cycles per frame plus the stream transfers, which overlap with decoding
// of the neighbouring frames.
module df_decoder #(
  parameter int unsigned LANES  = 360,
  parameter int unsigned NB     = 180,
  parameter int unsigned EB     = 630,
  parameter int unsigned DC_MAX = 7,
  parameter int unsigned DV_MAX = 8,
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned SUM_W  = ldpc_pkg::SUM_W,
  parameter int unsigned ITER_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic                        cfg_ent_we,
  input  logic [$clog2(EB)-1:0]       cfg_ent_addr,
  input  logic [$clog2(NB)-1:0]       cfg_ent_col,
  input  logic [$clog2(LANES)-1:0]    cfg_ent_shift,
  input  logic                        cfg_ent_row_last,
  input  logic                        cfg_col_we,
  input  logic [$clog2(EB)-1:0]       cfg_col_addr,
  input  logic [$clog2(EB)-1:0]       cfg_col_k,
  input  logic                        cfg_col_last,
  input  logic [$clog2(EB+1)-1:0]     num_edges,
  input  logic [$clog2(NB+1)-1:0]     num_cols,
  input  logic [ITER_W-1:0]           num_iter,
  // streams
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [LANES-1:0][MSG_W-1:0] in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [LANES-1:0]            out_data,
  output logic                        out_last,
  // status
  output logic                        core_busy,
  output logic                        core_done,
  output logic                        phase_start,
  output ldpc_pkg::fu_mode_e          phase_mode,
  output logic [ITER_W-1:0]           iter,
  output logic [1:0]                  llr_full,
  output logic [1:0]                  dec_full
);
  import ldpc_pkg::*;

  localparam int unsigned KW = $clog2(EB);
  localparam int unsigned CW = $clog2(NB);
  localparam int unsigned SW = $clog2(LANES);
  localparam int unsigned AW = $clog2(2 * NB);

  // manager <-> banks / core
  logic                        llr_we, dec_re, dec_start, llr_rbuf, dec_wbuf;
  logic [AW-1:0]               llr_waddr, dec_raddr;
  logic [LANES-1:0][MSG_W-1:0] llr_wdata;
  logic [LANES-1:0]            dec_rdata;

  // control <-> datapath
  logic           rd_en, fu_valid, fu_first, fu_last, fu_zero;
  logic           wr_en, dec_we;
  logic [KW-1:0]  rd_addr, wr_addr;
  logic [CW-1:0]  llr_addr, dec_addr;
  logic [SW-1:0]  rd_shift, wr_shift;
  fu_mode_e       fu_mode;

  // lane vectors
  logic [LANES-1:0][MSG_W-1:0] msg_rd, msg_rot, llr_rd, fu_out, fu_out_rot;
  logic [LANES-1:0]            fu_ov, fu_ol, fu_dec;

  df_manager #(.LANES(LANES), .NB(NB), .MSG_W(MSG_W)) u_manager (
    .clk, .rst_n, .num_cols,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_last,
    .llr_we, .llr_waddr, .llr_wdata,
    .dec_re, .dec_raddr, .dec_rdata,
    .dec_start, .dec_done(core_done), .llr_rbuf, .dec_wbuf,
    .llr_full, .dec_full
  );

  df_control #(.LANES(LANES), .NB(NB), .EB(EB), .DC_MAX(DC_MAX), .DV_MAX(DV_MAX),
               .ITER_W(ITER_W)) u_control (
    .clk, .rst_n,
    .cfg_ent_we, .cfg_ent_addr, .cfg_ent_col, .cfg_ent_shift, .cfg_ent_row_last,
    .cfg_col_we, .cfg_col_addr, .cfg_col_k, .cfg_col_last,
    .num_edges, .num_iter,
    .start(dec_start), .busy(core_busy), .done(core_done),
    .rd_en, .rd_addr, .llr_addr,
    .fu_mode, .fu_valid, .fu_first, .fu_last, .fu_zero, .rd_shift,
    .fu_out_valid(fu_ov[0]), .fu_out_last(fu_ol[0]),
    .wr_en, .wr_addr, .wr_shift, .dec_we, .dec_addr,
    .iter, .phase_start
  );

  assign phase_mode = fu_mode;

  // permutation network: read side and write-back side
  cyclic_shifter #(.LANES(LANES), .WIDTH(MSG_W)) u_perm_rd (
    .in(msg_rd), .shift(rd_shift), .out(msg_rot)
  );
  cyclic_shifter #(.LANES(LANES), .WIDTH(MSG_W)) u_perm_wr (
    .in(fu_out), .shift(wr_shift), .out(fu_out_rot)
  );

  for (genvar d = 0; d < LANES; d++) begin : g_lane
    df_bank #(.WIDTH(MSG_W), .DEPTH(EB)) u_msg_bank (
      .clk,
      .rd_en, .rd_addr, .rd_data(msg_rd[d]),
      .wr_en, .wr_addr, .wr_data(fu_out_rot[d])
    );

    df_bank #(.WIDTH(MSG_W), .DEPTH(2 * NB)) u_llr_bank (
      .clk,
      .rd_en, .rd_addr(AW'(llr_rbuf ? 32'(NB) + 32'(llr_addr) : 32'(llr_addr))),
      .rd_data(llr_rd[d]),
      .wr_en(llr_we), .wr_addr(llr_waddr), .wr_data(llr_wdata[d])
    );

    df_bank #(.WIDTH(1), .DEPTH(2 * NB)) u_dec_bank (
      .clk,
      .rd_en(dec_re), .rd_addr(dec_raddr), .rd_data(dec_rdata[d]),
      .wr_en(dec_we), .wr_addr(AW'(dec_wbuf ? 32'(NB) + 32'(dec_addr) : 32'(dec_addr))),
      .wr_data(fu_dec[d])
    );

    df_fu #(.MSG_W(MSG_W), .SUM_W(SUM_W), .DC_MAX(DC_MAX), .DV_MAX(DV_MAX)) u_fu (
      .clk, .rst_n,
      .mode(fu_mode), .in_valid(fu_valid),
      .in_msg(fu_zero ? '0 : msg_rot[d]), .in_llr(llr_rd[d]),
      .in_first(fu_first), .in_last(fu_last),
      .out_valid(fu_ov[d]), .out_msg(fu_out[d]), .out_last(fu_ol[d]), .out_dec(fu_dec[d])
    );
  end

  // all FUs run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (fu_ov == '0) || (fu_ov == '1));
  a_lockstep_last: assert property (@(posedge clk) disable iff (!rst_n) (fu_ol == '0) || (fu_ol == '1));

endmodule
