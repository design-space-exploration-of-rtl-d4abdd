// fwht: fast Walsh-Hadamard transform of Q = 2^M signed values, the Fourier
// transform over GF(2^M) used by the FFT-SPA check-node update:
// out[z] = sum over x of (-1)^popcount(x & z) * in[x]. It is built from M
// stages of Q/2 radix-2 butterflies (a + b, a - b), fully unrolled, with the
// word growing by one bit per stage (output WI + M bits), so no value is
// lost. The same circuit gives the inverse transform up to a factor Q, which
// the caller removes with a right shift by M. Purely combinational.
module fwht #(
  parameter int unsigned M  = 4,
  parameter int unsigned WI = 18
) (
  input  logic signed [(1<<M)-1:0][WI-1:0]   in,
  output logic signed [(1<<M)-1:0][WI+M-1:0] out
);
  localparam int unsigned Q  = 1 << M;
  localparam int unsigned WO = WI + M;

  logic signed [WO-1:0] st [M+1][Q];

  always_comb begin
    for (int x = 0; x < Q; x++) st[0][x] = WO'($signed(in[x]));
    for (int s = 0; s < M; s++) begin
      for (int x = 0; x < Q; x++) begin
        if ((x & (1 << s)) == 0) begin
          st[s+1][x]            = st[s][x] + st[s][x + (1 << s)];
          st[s+1][x + (1 << s)] = st[s][x] - st[s][x + (1 << s)];
        end
      end
    end
    for (int x = 0; x < Q; x++) out[x] = st[M][x];
  end
endmodule
