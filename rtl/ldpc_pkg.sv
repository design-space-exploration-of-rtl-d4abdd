// ldpc_pkg: types and helper functions shared by the binary min-sum (MSA)
// decoder modules. Messages are signed fixed-point log-likelihood ratios
// (LLRs) of MSG_W bits, kept in the symmetric range [-(2^(MSG_W-1)-1),
// 2^(MSG_W-1)-1] so that a magnitude always fits in MSG_W-1 bits. The
// 8-bit message width is this design's choice; the decoder's arithmetic
// format is left open by the method it implements.
package ldpc_pkg;

  localparam int unsigned MSG_W = 8;   // width of a channel LLR / edge message
  localparam int unsigned SUM_W = 12;  // width of the VN a-posteriori sum

  // Phase of the two-phase message-passing schedule.
  typedef enum logic [0:0] {
    MODE_CN = 1'b0,
    MODE_VN = 1'b1
  } fu_mode_e;

endpackage
