// gf_perm: permutation and depermutation of a probability mass function
// (pmf) on an edge of a non-binary Tanner graph. An edge with non-zero
// coefficient h in GF(2^M) moves the probability of symbol x to symbol h*x on
// its way from a variable node to a check node (permute: out[h*x] = in[x])
// and back on the way to the variable node (depermute: out[x] = in[h*x]).
// Each output lane is a multiplexer over the Q = 2^M input lanes selected by
// a GF product computed from h (h^-1 for permute). Lane 0 (symbol 0) never
// moves. Purely combinational; h = 0 is not a valid coefficient and gives
// out[x] = in[0] for every x in depermute mode.
module gf_perm #(
  parameter int unsigned M = 4,
  parameter int unsigned W = 18
) (
  input  logic [(1<<M)-1:0][W-1:0] in,
  input  logic [M-1:0]             h,
  input  logic                     depermute,
  output logic [(1<<M)-1:0][W-1:0] out
);
  localparam int unsigned Q = 1 << M;

  logic [M-1:0] mult;

  always_comb begin
    mult = depermute ? h : M'(nb_pkg::gf_inv(32'(h), M));
    for (int y = 0; y < Q; y++) begin
      out[y] = in[M'(nb_pkg::gf_mul(32'(mult), 32'(y), M))];
    end
  end
endmodule
