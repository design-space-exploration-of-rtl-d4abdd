// nb_vn_unit: serial variable-node (VN) unit of the non-binary FFT-SPA
// decoder, for a regular code with DV edges per VN. For each VN it receives
// the DV incoming check-to-variable pmfs m_cv(x), one per cycle, together
// with the channel pmf m_v(x) on the first, and then returns one
// variable-to-check pmf per cycle:
//   m_vc(x) = m_v(x) * product over the other edges c' of m_c'v(x),
// normalized to sum to one. This equals the a-posteriori pmf divided by the
// pmf of the edge itself, computed without a divider per edge and without
// trouble when a probability is zero. With the last output comes out_dec,
// the most likely symbol of the a-posteriori pmf m_v(x) * product of all
// m_cv(x) (lowest symbol on ties).
//
// All Q = 2^M symbols are processed in parallel (fully unrolled symbol loop).
// Two register sets alternate: one VN is loaded while the previous one is
// output, so a VN enters and leaves in DV cycles each and the unit accepts
// one pmf per cycle. The first output of a VN appears two cycles after its
// last input. in_zero replaces every incoming pmf by the uniform pmf (used
// for the first half-iteration). Probabilities are unsigned values with 15
// fractional bits carried in FW-bit signed words; negative inputs count as
// zero. The caller must not send a VN while both register sets are full;
// at one pmf per cycle in and out this never happens.
module nb_vn_unit #(
  parameter int unsigned M  = 4,
  parameter int unsigned DV = 2,
  parameter int unsigned FW = 18
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic signed [(1<<M)-1:0][FW-1:0] in_msg,
  input  logic signed [(1<<M)-1:0][FW-1:0] in_mv,
  input  logic                             in_zero,
  output logic                             out_valid,
  output logic signed [(1<<M)-1:0][FW-1:0] out_msg,
  output logic                             out_last,
  output logic [M-1:0]                     out_dec
);
  localparam int unsigned Q   = 1 << M;
  localparam int unsigned ONE = 1 << nb_pkg::PROB_FRAC;
  localparam int unsigned CW  = (DV > 1) ? $clog2(DV) : 1;

  logic [16:0] buf_q [2][DV][Q];
  logic [16:0] mv_q  [2][Q];
  logic [1:0]  full;
  logic        lset, oset;
  logic [CW-1:0] lcnt, ocnt;

  function automatic logic [16:0] clampp(input logic signed [FW-1:0] v);
    if (v <= 0)                   return '0;
    else if (32'(v) > ONE)        return 17'(ONE);
    else                          return 17'(v);
  endfunction

  // ---------------- load side ----------------
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int x = 0; x < Q; x++) begin
        buf_q[lset][lcnt][x] <= in_zero ? 17'(ONE) : clampp(in_msg[x]);
        if (lcnt == '0) mv_q[lset][x] <= clampp(in_mv[x]);
      end
    end
  end

  wire load_done = in_valid && (lcnt == CW'(DV - 1));
  wire out_fire  = full[oset];
  wire out_done  = out_fire && (ocnt == CW'(DV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lset <= 1'b0;
      oset <= 1'b0;
      lcnt <= '0;
      ocnt <= '0;
      full <= '0;
    end else begin
      if (in_valid) lcnt <= load_done ? '0 : lcnt + 1'b1;
      if (load_done) lset <= !lset;
      if (out_fire) ocnt <= out_done ? '0 : ocnt + 1'b1;
      if (out_done) oset <= !oset;
      for (int s = 0; s < 2; s++) begin
        if (load_done && lset == s[0])     full[s] <= 1'b1;
        else if (out_done && oset == s[0]) full[s] <= 1'b0;
      end
    end
  end

  // ---------------- output side ----------------
  logic [31:0] prod [Q];
  logic [31:0] app  [Q];
  logic [35:0] sum;
  logic [M-1:0] best;

  always_comb begin
    sum = '0;
    for (int x = 0; x < Q; x++) begin
      prod[x] = 32'(mv_q[oset][x]);
      app[x]  = 32'(mv_q[oset][x]);
      for (int j = 0; j < DV; j++) begin
        app[x] = (app[x] * 32'(buf_q[oset][j][x])) >> nb_pkg::PROB_FRAC;
        if (CW'(j) != ocnt) prod[x] = (prod[x] * 32'(buf_q[oset][j][x])) >> nb_pkg::PROB_FRAC;
      end
      sum += 36'(prod[x]);
    end
    best = '0;
    for (int x = 1; x < Q; x++) begin
      if (app[x] > app[best]) best = M'(x);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_dec   <= '0;
      out_msg   <= '0;
    end else begin
      out_valid <= out_fire;
      out_last  <= out_done;
      out_dec   <= best;
      for (int x = 0; x < Q; x++) begin
        if (sum == 0) out_msg[x] <= FW'(ONE / Q);
        else          out_msg[x] <= FW'((36'(prod[x]) << nb_pkg::PROB_FRAC) / sum);
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && full[lset]));

endmodule
