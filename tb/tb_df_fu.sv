// tb_df_fu: drives the functional unit with batches of check nodes (CN mode)
// and of variable nodes (VN mode), switching mode between batches once the
// unit has drained, and compares each output message, node-end flag and VN
// hard decision with a min-sum computation made here.
module tb_df_fu;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fu_mode_e          mode = MODE_CN;
  logic              in_valid = 0, in_first = 0, in_last = 0, out_valid, out_last, out_dec;
  logic signed [7:0] in_msg = 0, in_llr = 0, out_msg;
  df_fu dut (.*);
  int checks = 0, failures = 0;
  int exp_msg[$];
  bit exp_last[$], exp_dec[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_msg.size() == 0 || out_msg != exp_msg[0] || out_last != exp_last[0] ||
        (out_last && out_dec != exp_dec[0])) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d/%0d/%0d", out_msg, out_last, out_dec);
    end
    if (exp_msg.size()) begin
      void'(exp_msg.pop_front()); void'(exp_last.pop_front()); void'(exp_dec.pop_front());
    end
  end

  initial begin
    int v[$], deg, l, sum;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      mode = (b % 2) ? MODE_VN : MODE_CN;
      for (int n = 0; n < 10; n++) begin
        deg = $urandom_range(mode == MODE_CN ? 7 : 8, 2);
        v.delete();
        for (int q = 0; q < deg; q++) v.push_back($urandom_range(254) - 127);
        l = $urandom_range(254) - 127;
        sum = l;
        foreach (v[q]) sum += v[q];
        for (int q = 0; q < deg; q++) begin
          int mn, s, d;
          if (mode == MODE_CN) begin
            mn = 127; s = 0;
            for (int r = 0; r < deg; r++) if (r != q) begin
              if ((v[r] < 0 ? -v[r] : v[r]) < mn) mn = (v[r] < 0 ? -v[r] : v[r]);
              if (v[r] < 0) s ^= 1;
            end
            exp_msg.push_back(s ? -mn : mn);
          end else begin
            d = sum - v[q];
            exp_msg.push_back(d > 127 ? 127 : (d < -127 ? -127 : d));
          end
          exp_last.push_back(q == deg - 1);
          exp_dec.push_back((mode == MODE_VN) && (sum < 0));
        end
        for (int q = 0; q < deg; q++) begin
          in_valid = 1; in_msg = 8'(v[q]); in_llr = 8'(l);
          in_first = (q == 0); in_last = (q == deg - 1);
          @(negedge clk);
        end
      end
      in_valid = 0;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (exp_msg.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
