// tb_cn_unit: random check nodes of degree 1..DC_MAX are streamed into the
// serial CN datapath back to back or with random gaps. Every output message
// is compared with a min-sum computation made here (minimum magnitude of the
// other inputs, product of the other signs), in order, together with the
// node-end flag. It also checks that the outputs of a node start one cycle
// after its last input when the unit is otherwise idle (latency 1 cycle,
// throughput one message per cycle).
module tb_cn_unit;
  localparam int unsigned DC_MAX = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              in_valid = 0, in_last = 0, out_valid, out_last;
  logic signed [7:0] in_msg = 0, out_msg;

  cn_unit #(.DC_MAX(DC_MAX)) dut (.*);

  int checks = 0, failures = 0;
  int exp_msg[$];
  bit exp_last[$];
  int cyc = 0, last_in_cyc = -1, first_out_cyc = -1;
  bit idle_node;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_msg.size() == 0 || out_msg != exp_msg[0] || out_last != exp_last[0]) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d/%0d exp %0d/%0d", out_msg, out_last,
                                  exp_msg.size() ? exp_msg[0] : 999, exp_last.size() ? exp_last[0] : 0);
    end
    if (exp_msg.size()) begin void'(exp_msg.pop_front()); void'(exp_last.pop_front()); end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int deg, v[$], m1, m2, i1, sg;
      deg = $urandom_range(DC_MAX, 1);
      v.delete();
      if (n == 0) deg = 1;
      for (int q = 0; q < deg; q++) begin
        automatic int x = $signed(8'($urandom_range(255)));
        if ($urandom_range(3) == 0) x = $urandom_range(4) - 2;   // small values, ties
        v.push_back(x);
      end
      // expected outputs
      for (int q = 0; q < deg; q++) begin
        automatic int mn = 127, s = 0;
        for (int r = 0; r < deg; r++) if (r != q) begin
          automatic int a = (v[r] == -128) ? 127 : ((v[r] < 0) ? -v[r] : v[r]);
          if (a < mn) mn = a;
          if (v[r] < 0) s ^= 1;
        end
        exp_msg.push_back(s ? -mn : mn);
        exp_last.push_back(q == deg - 1);
      end
      idle_node = (n % 50 == 49);
      if (idle_node) repeat (3 * DC_MAX) @(negedge clk);
      for (int q = 0; q < deg; q++) begin
        in_valid = 1; in_msg = 8'(v[q]); in_last = (q == deg - 1);
        @(negedge clk);
        if (idle_node && q == deg - 1) last_in_cyc = cyc;
        if ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      if (idle_node) begin
        while (!out_valid) @(negedge clk);
        checks++;
        if (cyc - last_in_cyc != 1) begin
          failures++;
          $display("FAIL: latency %0d", cyc - last_in_cyc);
        end
      end
    end
    repeat (3 * DC_MAX) @(negedge clk);
    checks++;
    if (exp_msg.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_msg.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
