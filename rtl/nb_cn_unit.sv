// nb_cn_unit: serial check-node (CN) unit of the non-binary FFT-SPA decoder,
// working in the Fourier (Walsh-Hadamard) domain for a regular code with DC
// edges per CN. It receives the DC transformed variable-to-check pmfs of a
// CN, one per cycle, and returns for each edge the product of the other
// edges' transforms, symbol by symbol:
//   P_c(z) = product over the other edges v' of M_v'c(z),
// divided by its own z = 0 term P_c(0) so that the pmf it stands for sums to
// one (P_c(0) is that sum). If P_c(0) is not positive the product is passed
// on unscaled. Values are signed with 15 fractional bits in FW-bit words and
// saturate at +-1.0.
//
// All Q = 2^M transform points are computed in parallel. Two register sets
// alternate, so one CN is loaded while the previous one is output and the
// unit accepts one transformed pmf per cycle; the first output of a CN
// appears two cycles after its last input.
module nb_cn_unit #(
  parameter int unsigned M  = 4,
  parameter int unsigned DC = 3,
  parameter int unsigned FW = 18
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic signed [(1<<M)-1:0][FW-1:0] in_msg,
  output logic                             out_valid,
  output logic signed [(1<<M)-1:0][FW-1:0] out_msg,
  output logic                             out_last
);
  localparam int unsigned Q   = 1 << M;
  localparam int          ONE = 1 << nb_pkg::PROB_FRAC;
  localparam int unsigned CW  = (DC > 1) ? $clog2(DC) : 1;

  logic signed [FW-1:0] buf_q [2][DC][Q];
  logic [1:0]    full;
  logic          lset, oset;
  logic [CW-1:0] lcnt, ocnt;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int x = 0; x < Q; x++) buf_q[lset][lcnt][x] <= in_msg[x];
    end
  end

  wire load_done = in_valid && (lcnt == CW'(DC - 1));
  wire out_fire  = full[oset];
  wire out_done  = out_fire && (ocnt == CW'(DC - 1));

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

  logic signed [47:0] prod [Q];
  logic signed [47:0] scaled [Q];

  always_comb begin
    for (int x = 0; x < Q; x++) begin
      prod[x] = 48'(ONE);
      for (int j = 0; j < DC; j++) begin
        if (CW'(j) != ocnt) prod[x] = (prod[x] * 48'(buf_q[oset][j][x])) >>> nb_pkg::PROB_FRAC;
      end
    end
    for (int x = 0; x < Q; x++) begin
      if (prod[0] > 0) scaled[x] = (prod[x] <<< nb_pkg::PROB_FRAC) / prod[0];
      else             scaled[x] = prod[x];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_msg   <= '0;
    end else begin
      out_valid <= out_fire;
      out_last  <= out_done;
      for (int x = 0; x < Q; x++) begin
        if (scaled[x] > 48'(ONE))       out_msg[x] <= FW'(ONE);
        else if (scaled[x] < -48'(ONE)) out_msg[x] <= FW'(-ONE);
        else                            out_msg[x] <= FW'(scaled[x]);
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && full[lset]));

endmodule
