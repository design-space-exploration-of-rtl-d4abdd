// df_control: controller of the dataflow decoder. It runs the two-phase
// (flooding) min-sum schedule over a quasi-cyclic parity-check matrix whose
// LANES x LANES circulants are described by a base-matrix table, one entry
// per non-zero circulant. Entry k (in row-major order) holds the block column
// col, the cyclic shift and row_last (k is the last entry of its block row).
// A second table lists the entries in column-major order: {k, col_last}.
// Both tables are written by the host through the cfg_* ports before a
// decode; num_edges gives the number of entries, num_iter the iterations.
//
// Message bank address k holds, in the bank of lane d, the message on the
// edge of circulant k that belongs to check node (block row * LANES + d).
// A CN phase therefore walks k = 0 .. num_edges-1 with no rotation; a VN phase
// walks the column-major list, reads address k in all banks and rotates the
// read vector by the circulant's shift so that lane d sees the edge of
// variable node (col * LANES + d); the results are rotated back before they
// are written. One address is issued per cycle. A decode is: one VN phase
// with all CN messages forced to zero (it sends the channel LLRs to the
// CNs), then num_iter times a CN phase followed by a VN phase. Each phase
// waits for the functional units to drain before the next starts, so no
// message is read before it is rewritten. Hard decisions are written by every
// VN phase; the last one is the result.
//
// Timing: issue registers (stage 0) drive the bank read ports; bank data
// appear with the stage-1 registers, which drive the functional units. A tag
// queue keeps {k, shift, col} of every message in flight and is popped when
// the units return a message (fu_out_valid), giving the write-back address;
// the bank write enable wr_en is fu_out_valid itself, passed straight through.
// A decode of E entries and I iterations takes about (2I+1)(E + 2*DMAX + 4)
// cycles. start is accepted in IDLE; done pulses one cycle at the end.
module df_control #(
  parameter int unsigned LANES  = 360,
  parameter int unsigned NB     = 180,
  parameter int unsigned EB     = 630,
  parameter int unsigned DC_MAX = 7,
  parameter int unsigned DV_MAX = 8,
  parameter int unsigned ITER_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  // base-matrix tables
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
  input  logic [ITER_W-1:0]           num_iter,
  // decode control
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // stage 0: bank reads
  output logic                        rd_en,
  output logic [$clog2(EB)-1:0]       rd_addr,
  output logic [$clog2(NB)-1:0]       llr_addr,
  // stage 1: functional-unit inputs
  output ldpc_pkg::fu_mode_e          fu_mode,
  output logic                        fu_valid,
  output logic                        fu_first,
  output logic                        fu_last,
  output logic                        fu_zero,
  output logic [$clog2(LANES)-1:0]    rd_shift,
  // write-back
  input  logic                        fu_out_valid,
  input  logic                        fu_out_last,
  output logic                        wr_en,
  output logic [$clog2(EB)-1:0]       wr_addr,
  output logic [$clog2(LANES)-1:0]    wr_shift,
  output logic                        dec_we,
  output logic [$clog2(NB)-1:0]       dec_addr,
  // status
  output logic [ITER_W-1:0]           iter,
  output logic                        phase_start
);
  import ldpc_pkg::*;

  localparam int unsigned KW   = $clog2(EB);
  localparam int unsigned CW   = $clog2(NB);
  localparam int unsigned SW   = $clog2(LANES);
  localparam int unsigned DMAX = (DC_MAX > DV_MAX) ? DC_MAX : DV_MAX;

  typedef struct packed {
    logic [CW-1:0] col;
    logic [SW-1:0] shift;
    logic          row_last;
  } ent_t;

  typedef struct packed {
    logic [KW-1:0] k;
    logic          col_last;
  } colent_t;

  typedef struct packed {
    logic [KW-1:0] k;
    logic [SW-1:0] shift;
    logic [CW-1:0] col;
  } tag_t;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_e;

  ent_t    ent_tab [EB];
  colent_t col_tab [EB];

  always_ff @(posedge clk) begin
    if (cfg_ent_we) ent_tab[cfg_ent_addr] <= ent_t'{col: cfg_ent_col, shift: cfg_ent_shift,
                                                    row_last: cfg_ent_row_last};
    if (cfg_col_we) col_tab[cfg_col_addr] <= colent_t'{k: cfg_col_k, col_last: cfg_col_last};
  end

  state_e        state;
  fu_mode_e      mode;
  logic          zero_phase;
  logic [KW-1:0] t;
  logic          prev_last;

  // issue-side lookup
  logic [KW-1:0] k_i;
  ent_t          e_i;
  logic          last_i;

  always_comb begin
    k_i    = (mode == MODE_VN) ? col_tab[t].k : t;
    e_i    = ent_tab[k_i];
    last_i = (mode == MODE_VN) ? col_tab[t].col_last : e_i.row_last;
  end

  // pipeline registers
  logic          s0_valid, s0_first, s0_last;
  logic [KW-1:0] s0_k;
  logic [SW-1:0] s0_s;
  logic [CW-1:0] s0_j;
  logic          s1_valid;
  logic [KW-1:0] s1_k;
  logic [SW-1:0] s1_s;
  logic [CW-1:0] s1_j;

  logic tag_empty;
  tag_t tag_head;

  wire issue     = (state == S_ISSUE);
  wire last_addr = (32'(t) + 1 >= 32'(num_edges));
  wire drained   = !s0_valid && !s1_valid && tag_empty && !fu_out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      mode        <= MODE_VN;
      zero_phase  <= 1'b0;
      t           <= '0;
      prev_last   <= 1'b1;
      iter        <= '0;
      phase_start <= 1'b0;
    end else begin
      phase_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_ISSUE;
          mode        <= MODE_VN;
          zero_phase  <= 1'b1;
          iter        <= '0;
          t           <= '0;
          prev_last   <= 1'b1;
          phase_start <= 1'b1;
        end
        S_ISSUE: begin
          prev_last <= last_i;
          t         <= t + 1'b1;
          if (last_addr) state <= S_WAIT;
        end
        S_WAIT: if (drained) begin
          t           <= '0;
          prev_last   <= 1'b1;
          zero_phase  <= 1'b0;
          if (mode == MODE_VN && iter == num_iter) begin
            state <= S_DONE;
          end else begin
            state       <= S_ISSUE;
            phase_start <= 1'b1;
            if (mode == MODE_VN) begin
              mode <= MODE_CN;
            end else begin
              mode <= MODE_VN;
              iter <= iter + 1'b1;
            end
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
      s0_first <= 1'b0;
      s0_last  <= 1'b0;
      s0_k     <= '0;
      s0_s     <= '0;
      s0_j     <= '0;
      s1_valid <= 1'b0;
      fu_first <= 1'b0;
      fu_last  <= 1'b0;
      s1_k     <= '0;
      s1_s     <= '0;
      s1_j     <= '0;
    end else begin
      s0_valid <= issue;
      s0_first <= prev_last;
      s0_last  <= last_i;
      s0_k     <= k_i;
      s0_s     <= (mode == MODE_VN) ? e_i.shift : '0;
      s0_j     <= e_i.col;
      s1_valid <= s0_valid;
      fu_first <= s0_first;
      fu_last  <= s0_last;
      s1_k     <= s0_k;
      s1_s     <= s0_s;
      s1_j     <= s0_j;
    end
  end

  assign rd_en    = s0_valid;
  assign rd_addr  = s0_k;
  assign llr_addr = s0_j;
  assign fu_valid = s1_valid;
  assign fu_mode  = mode;
  assign fu_zero  = zero_phase;
  assign rd_shift = s1_s;

  // write-back tags
  msg_fifo #(.WIDTH($bits(tag_t)), .DEPTH(2 * DMAX + 4)) u_tags (
    .clk, .rst_n,
    .push(s1_valid), .wr_data(tag_t'{k: s1_k, shift: s1_s, col: s1_j}),
    .pop(fu_out_valid), .rd_data(tag_head), .empty(tag_empty), .full(), .count()
  );

  assign wr_en    = fu_out_valid;
  assign wr_addr  = tag_head.k;
  assign wr_shift = (tag_head.shift == '0) ? '0 : SW'(LANES - 32'(tag_head.shift));
  assign dec_we   = fu_out_valid && fu_out_last && (mode == MODE_VN);
  assign dec_addr = tag_head.col;

endmodule
