// cyclic_shifter: permutation network of the dataflow decoder. It rotates a
// vector of LANES words of WIDTH bits so that out[d] = in[(d + shift) mod
// LANES], which maps the Tanner-graph edges of one LANES x LANES circulant of a
// quasi-cyclic parity-check matrix onto the functional units. Rotating by
// (LANES - shift) mod LANES undoes it. It is built as a logarithmic barrel
// shifter: stage k rotates by (2^k mod LANES) when bit k of shift is set, so
// any LANES (not only powers of two) works for shift < LANES. Purely
// combinational.
module cyclic_shifter #(
  parameter int unsigned LANES = 360,
  parameter int unsigned WIDTH = 8
) (
  input  logic [LANES-1:0][WIDTH-1:0]  in,
  input  logic [$clog2(LANES)-1:0]     shift,
  output logic [LANES-1:0][WIDTH-1:0]  out
);
  localparam int unsigned SW = $clog2(LANES);

  logic [LANES-1:0][WIDTH-1:0] stage [SW+1];

  assign stage[0] = in;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned ROT = (1 << k) % LANES;
    for (genvar d = 0; d < LANES; d++) begin : g_lane
      assign stage[k+1][d] = shift[k] ? stage[k][(d + ROT) % LANES] : stage[k][d];
    end
  end

  assign out = stage[SW];
endmodule
