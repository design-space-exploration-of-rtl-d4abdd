// tb_vn_unit: random variable nodes of degree 1..DV_MAX with random channel
// LLRs are streamed into the serial VN datapath. Each output message must be
// L(m_v) + sum of the inputs - its own input, saturated to 8 bits, the
// a-posteriori output must be the full (12-bit saturated) sum, and node
// boundaries must be kept. Also checks the one-cycle latency from the last
// input of a node to its first output when the unit is idle.
module tb_vn_unit;
  localparam int unsigned DV_MAX = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic               in_valid = 0, in_first = 0, in_last = 0, out_valid, out_last;
  logic signed [7:0]  in_msg = 0, in_llr = 0, out_msg;
  logic signed [11:0] out_app;

  vn_unit #(.DV_MAX(DV_MAX)) dut (.*);

  int checks = 0, failures = 0;
  int exp_msg[$], exp_app[$];
  bit exp_last[$];
  int cyc = 0, last_in_cyc;
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
    if (exp_msg.size() == 0 || out_msg != exp_msg[0] || out_last != exp_last[0] ||
        out_app != exp_app[0]) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d/%0d/%0d exp %0d/%0d/%0d", out_msg, out_app, out_last,
                                  exp_msg[0], exp_app[0], exp_last[0]);
    end
    if (exp_msg.size()) begin
      void'(exp_msg.pop_front()); void'(exp_last.pop_front()); void'(exp_app.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int deg, v[$], l, sum;
      deg = $urandom_range(DV_MAX, 1);
      v.delete();
      l = $signed(8'($urandom_range(255)));
      sum = l;
      for (int q = 0; q < deg; q++) begin
        automatic int x = $signed(8'($urandom_range(255)));
        if (x == -128) x = -127;
        v.push_back(x);
        sum += x;
      end
      for (int q = 0; q < deg; q++) begin
        automatic int d = sum - v[q];
        exp_msg.push_back(d > 127 ? 127 : (d < -127 ? -127 : d));
        exp_app.push_back(sum);
        exp_last.push_back(q == deg - 1);
      end
      idle_node = (n % 50 == 49);
      if (idle_node) repeat (3 * DV_MAX) @(negedge clk);
      for (int q = 0; q < deg; q++) begin
        in_valid = 1; in_msg = 8'(v[q]); in_llr = (q == 0) ? 8'(l) : 8'($urandom_range(255));
        in_first = (q == 0); in_last = (q == deg - 1);
        @(negedge clk);
        if (idle_node && q == deg - 1) last_in_cyc = cyc;
        if ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      if (idle_node) begin
        while (!out_valid) @(negedge clk);
        checks++;
        if (cyc - last_in_cyc != 1) begin failures++; $display("FAIL: latency %0d", cyc - last_in_cyc); end
      end
    end
    repeat (3 * DV_MAX) @(negedge clk);
    checks++;
    if (exp_msg.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_msg.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
