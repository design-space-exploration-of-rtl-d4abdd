// df_fu: pipelined functional unit (FU) of the dataflow decoder. It holds a
// serial CN datapath (cn_unit) and a serial VN datapath (vn_unit) that share
// one clock, reset and one input/output port; the mode input steers each
// incoming message to one of them. Both datapaths keep running on their own,
// so the messages of a CN batch can still be draining while the first VN
// messages are loaded, and the other way around.
//
// Input: one message per cycle (in_valid, in_msg) with node boundaries
// (in_first, in_last); in VN mode in_llr carries the channel LLR with the
// first message of a VN. Output: one message per cycle (out_valid, out_msg,
// out_last) from whichever datapath produces it, plus out_dec, the hard
// decision (1 when the a-posteriori LLR is negative) valid with out_last of a
// VN. A node of degree d leaves the unit starting one cycle after its last
// message enters; the controller must not start a new phase before both
// datapaths have drained when the results of one feed the other.
module df_fu #(
  parameter int unsigned MSG_W  = ldpc_pkg::MSG_W,
  parameter int unsigned SUM_W  = ldpc_pkg::SUM_W,
  parameter int unsigned DC_MAX = 7,
  parameter int unsigned DV_MAX = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ldpc_pkg::fu_mode_e      mode,
  input  logic                    in_valid,
  input  logic signed [MSG_W-1:0] in_msg,
  input  logic signed [MSG_W-1:0] in_llr,
  input  logic                    in_first,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic signed [MSG_W-1:0] out_msg,
  output logic                    out_last,
  output logic                    out_dec
);
  import ldpc_pkg::*;

  logic                    cn_ov, cn_ol, vn_ov, vn_ol;
  logic signed [MSG_W-1:0] cn_om, vn_om;
  logic signed [SUM_W-1:0] vn_app;

  cn_unit #(.MSG_W(MSG_W), .DC_MAX(DC_MAX)) u_cn (
    .clk, .rst_n,
    .in_valid(in_valid && mode == MODE_CN), .in_msg, .in_last,
    .out_valid(cn_ov), .out_msg(cn_om), .out_last(cn_ol)
  );

  vn_unit #(.MSG_W(MSG_W), .SUM_W(SUM_W), .DV_MAX(DV_MAX)) u_vn (
    .clk, .rst_n,
    .in_valid(in_valid && mode == MODE_VN), .in_msg, .in_llr, .in_first, .in_last,
    .out_valid(vn_ov), .out_msg(vn_om), .out_app(vn_app), .out_last(vn_ol)
  );

  // Only one datapath produces output in a given cycle as long as the
  // controller drains one phase before it starts the next.
  always_comb begin
    out_valid = cn_ov || vn_ov;
    out_msg   = vn_ov ? vn_om : cn_om;
    out_last  = vn_ov ? vn_ol : cn_ol;
    out_dec   = vn_ov && vn_app[SUM_W-1];
  end

  a_one_output: assert property (@(posedge clk) disable iff (!rst_n) !(cn_ov && vn_ov));

endmodule
