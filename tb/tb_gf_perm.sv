// tb_gf_perm: exhaustive check of the GF(2^M) edge permutation for M = 2, 3
// and 4. For every nonzero coefficient h and random input vectors it checks
// permute (out[h*x] = in[x]) and depermute (out[x] = in[h*x]) against a
// field multiplier written out in this file, and that depermute undoes
// permute. Combinational block, so no cycle counts apply.
module tb_gf_perm;
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

  function automatic int mul(int a, int b, int m);
    int r = 0;
    int p = (m == 2) ? 'h7 : (m == 3) ? 'hb : 'h13;
    for (int i = 0; i < m; i++) begin
      if ((b >> i) & 1) r ^= a;
      a <<= 1;
      if ((a >> m) & 1) a ^= p;
    end
    return r;
  endfunction

  logic [3:0][W-1:0]  in2, p2, d2, r2;
  logic [7:0][W-1:0]  in3, p3, d3, r3;
  logic [15:0][W-1:0] in4, p4, d4, r4;
  logic [1:0] h2;
  logic [2:0] h3;
  logic [3:0] h4;
  gf_perm #(.M(2), .W(W)) u_p2 (.in(in2), .h(h2), .depermute(1'b0), .out(p2));
  gf_perm #(.M(2), .W(W)) u_d2 (.in(in2), .h(h2), .depermute(1'b1), .out(d2));
  gf_perm #(.M(2), .W(W)) u_r2 (.in(p2),  .h(h2), .depermute(1'b1), .out(r2));
  gf_perm #(.M(3), .W(W)) u_p3 (.in(in3), .h(h3), .depermute(1'b0), .out(p3));
  gf_perm #(.M(3), .W(W)) u_d3 (.in(in3), .h(h3), .depermute(1'b1), .out(d3));
  gf_perm #(.M(3), .W(W)) u_r3 (.in(p3),  .h(h3), .depermute(1'b1), .out(r3));
  gf_perm #(.M(4), .W(W)) u_p4 (.in(in4), .h(h4), .depermute(1'b0), .out(p4));
  gf_perm #(.M(4), .W(W)) u_d4 (.in(in4), .h(h4), .depermute(1'b1), .out(d4));
  gf_perm #(.M(4), .W(W)) u_r4 (.in(p4),  .h(h4), .depermute(1'b1), .out(r4));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int h = 1; h < 16; h++) begin
        for (int x = 0; x < 16; x++) in4[x] = W'($urandom);
        for (int x = 0; x < 8; x++)  in3[x] = W'($urandom);
        for (int x = 0; x < 4; x++)  in2[x] = W'($urandom);
        h4 = 4'(h); h3 = 3'(h % 8 == 0 ? 1 : h % 8); h2 = 2'(h % 4 == 0 ? 1 : h % 4);
        #1;
        for (int x = 0; x < 16; x++) begin
          check(p4[mul(h4, x, 4)] == in4[x], "M=4 permute");
          check(d4[x] == in4[mul(h4, x, 4)], "M=4 depermute");
          check(r4[x] == in4[x], "M=4 round trip");
        end
        for (int x = 0; x < 8; x++) begin
          check(p3[mul(h3, x, 3)] == in3[x], "M=3 permute");
          check(d3[x] == in3[mul(h3, x, 3)], "M=3 depermute");
          check(r3[x] == in3[x], "M=3 round trip");
        end
        for (int x = 0; x < 4; x++) begin
          check(p2[mul(h2, x, 2)] == in2[x], "M=2 permute");
          check(d2[x] == in2[mul(h2, x, 2)], "M=2 depermute");
          check(r2[x] == in2[x], "M=2 round trip");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
