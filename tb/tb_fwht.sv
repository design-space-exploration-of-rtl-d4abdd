// tb_fwht: checks the Walsh-Hadamard transform for M = 2 and 4 against the
// direct O(Q^2) sum out[z] = sum_x (-1)^popcount(x & z) in[x] on random
// signed inputs including full-scale values, and checks that applying the
// transform twice returns Q times the input. Combinational block, so no
// cycle counts apply.
module tb_fwht;
  localparam int W = 18;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", w); end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0][W-1:0]   in4;
  logic signed [15:0][W+3:0]   o4;
  logic signed [15:0][W+7:0]   oo4;
  logic signed [3:0][W-1:0]    in2;
  logic signed [3:0][W+1:0]    o2;
  fwht #(.M(4), .WI(W))     u4  (.in(in4), .out(o4));
  fwht #(.M(4), .WI(W + 4)) u44 (.in(o4),  .out(oo4));
  fwht #(.M(2), .WI(W))     u2  (.in(in2), .out(o2));

  function automatic longint sx(longint v, int w);
    return (v << (64 - w)) >>> (64 - w);
  endfunction

  initial begin
    for (int rep = 0; rep < 500; rep++) begin
      for (int x = 0; x < 16; x++)
        in4[x] = (rep % 10 == 0) ? ((x % 2) ? W'(1 << (W - 1)) : W'((1 << (W - 1)) - 1)) : W'($urandom);
      for (int x = 0; x < 4; x++) in2[x] = W'($urandom);
      #1;
      for (int z = 0; z < 16; z++) begin
        longint s = 0;
        s = 0;
        for (int x = 0; x < 16; x++)
          s += ($countones(x & z) % 2) ? -sx(in4[x], W) : sx(in4[x], W);
        check(sx(o4[z], W + 4) == s, $sformatf("M=4 z=%0d", z));
        check(sx(oo4[z], W + 8) == 16 * sx(in4[z], W), "M=4 double transform");
      end
      for (int z = 0; z < 4; z++) begin
        longint s;
        s = 0;
        for (int x = 0; x < 4; x++)
          s += ($countones(x & z) % 2) ? -sx(in2[x], W) : sx(in2[x], W);
        check(sx(o2[z], W + 2) == s, $sformatf("M=2 z=%0d", z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
