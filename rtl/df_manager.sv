// df_manager: stream manager of the dataflow decoder (front end and back
// end). It moves codewords from the input stream into the channel-LLR banks
// and hard decisions from the decision banks to the output stream, and hands
// frames to the decoder core. Both bank sets are double buffered, so a frame
// can be received, another decoded and a third sent out at the same time.
//
// Input stream: in_valid/in_ready, one beat per block column of LANES channel
// LLRs (lane d of beat j is the LLR of variable node j*LANES + d); num_cols
// beats make a frame. A two-entry FIFO decouples the stream from the banks.
// The manager fills LLR buffer lbuf; when a frame is complete the buffer is
// marked full. Whenever the core is idle, the oldest full LLR buffer is ready
// and the next decision buffer is free, it pulses dec_start and tells the core
// which buffers to use (llr_rbuf, dec_wbuf). At dec_done the LLR buffer is
// freed and the decision buffer marked full. The back end reads full decision
// buffers row by row (one-cycle read latency) into a four-entry FIFO that
// drives out_valid/out_ready; out_last marks the last beat of a frame.
// Bank addresses are buffer*NB + column.
module df_manager #(
  parameter int unsigned LANES = 360,
  parameter int unsigned NB    = 180,
  parameter int unsigned MSG_W = ldpc_pkg::MSG_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [$clog2(NB+1)-1:0]               num_cols,
  // input stream
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  logic [LANES-1:0][MSG_W-1:0]           in_data,
  // output stream
  output logic                                  out_valid,
  input  logic                                  out_ready,
  output logic [LANES-1:0]                      out_data,
  output logic                                  out_last,
  // channel-LLR bank write port
  output logic                                  llr_we,
  output logic [$clog2(2*NB)-1:0]               llr_waddr,
  output logic [LANES-1:0][MSG_W-1:0]           llr_wdata,
  // decision bank read port
  output logic                                  dec_re,
  output logic [$clog2(2*NB)-1:0]               dec_raddr,
  input  logic [LANES-1:0]                      dec_rdata,
  // decoder core handshake
  output logic                                  dec_start,
  input  logic                                  dec_done,
  output logic                                  llr_rbuf,
  output logic                                  dec_wbuf,
  output logic [1:0]                            llr_full,
  output logic [1:0]                            dec_full
);
  localparam int unsigned CW = $clog2(NB + 1);
  localparam int unsigned AW = $clog2(2 * NB);
  localparam int unsigned OD = 4;

  // ---------------- front end ----------------
  logic [LANES-1:0][MSG_W-1:0] if_head;
  logic                        if_empty, if_full, if_pop;
  logic                        lbuf;
  logic [CW-1:0]               lcnt;

  msg_fifo #(.WIDTH(LANES * MSG_W), .DEPTH(2)) u_in_fifo (
    .clk, .rst_n,
    .push(in_valid && !if_full), .wr_data(in_data),
    .pop(if_pop), .rd_data(if_head), .empty(if_empty), .full(if_full), .count()
  );

  assign in_ready  = !if_full;
  assign if_pop    = !if_empty && !llr_full[lbuf];
  assign llr_we    = if_pop;
  assign llr_waddr = AW'(lbuf ? 32'(NB) + 32'(lcnt) : 32'(lcnt));
  assign llr_wdata = if_head;

  wire frame_loaded = if_pop && (lcnt == CW'(num_cols - 1'b1));

  // ---------------- core handshake ----------------
  logic running;
  assign dec_start = !running && llr_full[llr_rbuf] && !dec_full[dec_wbuf];

  // ---------------- back end ----------------
  logic                 obuf, rd_pend, rd_pend_last;
  logic [CW-1:0]        ocnt;
  logic [$clog2(OD+1)-1:0] of_count;
  logic [LANES:0]       of_head;
  logic                 of_empty;

  wire rd_issue   = dec_full[obuf] && (32'(of_count) + 32'(rd_pend) < OD);
  wire rd_is_last = (ocnt == CW'(num_cols - 1'b1));

  assign dec_re    = rd_issue;
  assign dec_raddr = AW'(obuf ? 32'(NB) + 32'(ocnt) : 32'(ocnt));

  msg_fifo #(.WIDTH(LANES + 1), .DEPTH(OD)) u_out_fifo (
    .clk, .rst_n,
    .push(rd_pend), .wr_data({rd_pend_last, dec_rdata}),
    .pop(out_valid && out_ready), .rd_data(of_head), .empty(of_empty), .full(), .count(of_count)
  );

  assign out_valid = !of_empty;
  assign out_data  = of_head[LANES-1:0];
  assign out_last  = of_head[LANES];

  // ---------------- buffer bookkeeping ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lbuf         <= 1'b0;
      lcnt         <= '0;
      llr_full     <= '0;
      llr_rbuf     <= 1'b0;
      dec_wbuf     <= 1'b0;
      dec_full     <= '0;
      running      <= 1'b0;
      obuf         <= 1'b0;
      ocnt         <= '0;
      rd_pend      <= 1'b0;
      rd_pend_last <= 1'b0;
    end else begin
      // load side
      if (if_pop) begin
        if (frame_loaded) begin
          lcnt <= '0;
          lbuf <= !lbuf;
        end else begin
          lcnt <= lcnt + 1'b1;
        end
      end
      for (int b = 0; b < 2; b++) begin
        if (frame_loaded && lbuf == b[0])                llr_full[b] <= 1'b1;
        else if (running && dec_done && llr_rbuf == b[0]) llr_full[b] <= 1'b0;
      end
      // core side
      if (dec_start) running <= 1'b1;
      if (running && dec_done) begin
        running  <= 1'b0;
        llr_rbuf <= !llr_rbuf;
        dec_wbuf <= !dec_wbuf;
      end
      for (int b = 0; b < 2; b++) begin
        if (running && dec_done && dec_wbuf == b[0])      dec_full[b] <= 1'b1;
        else if (rd_issue && rd_is_last && obuf == b[0])  dec_full[b] <= 1'b0;
      end
      // unload side
      rd_pend      <= rd_issue;
      rd_pend_last <= rd_issue && rd_is_last;
      if (rd_issue) begin
        if (rd_is_last) begin
          ocnt <= '0;
          obuf <= !obuf;
        end else begin
          ocnt <= ocnt + 1'b1;
        end
      end
    end
  end

endmodule
