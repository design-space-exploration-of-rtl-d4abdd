// tb_nb_cn_unit: drives random groups of DC transformed pmfs (signed values
// with 15 fractional bits, including negative values, zeros and groups whose
// product has a non-positive zero term) into nb_cn_unit with random idle
// gaps. A reference model in this file forms, for every edge, the
// point-wise product of the other edges' values, divides it by its own
// z = 0 term when that is positive and saturates at +-1.0; every output is
// compared. It also checks the two-cycle latency from the last input of a
// check node to its first output and an unbroken output stream for an
// unbroken input stream.
module tb_nb_cn_unit;
  localparam int M = 4, DC = 3, FW = 18, Q = 1 << M, ONE = 1 << 15;
  localparam int NODES = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", w); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid = 0, out_valid, out_last;
  logic signed [Q-1:0][FW-1:0] in_msg = '0, out_msg;
  nb_cn_unit #(.M(M), .DC(DC), .FW(FW)) dut (.*);

  typedef struct { longint msg[Q]; bit last; } exp_t;
  exp_t expq[$];
  int last_in_cyc[$];
  int cyc = 0, outs = 0, streaming = 1;
  always @(posedge clk) cyc++;

  task automatic model(longint in[DC][Q]);
    for (int k = 0; k < DC; k++) begin
      exp_t e;
      longint p[Q], s;
      for (int x = 0; x < Q; x++) begin
        p[x] = ONE;
        for (int j = 0; j < DC; j++) if (j != k) p[x] = (p[x] * in[j][x]) >>> 15;
      end
      for (int x = 0; x < Q; x++) begin
        s = (p[0] > 0) ? (p[x] <<< 15) / p[0] : p[x];
        e.msg[x] = (s > ONE) ? ONE : (s < -ONE) ? -ONE : s;
      end
      e.last = (k == DC - 1);
      expq.push_back(e);
    end
  endtask

  int prev_valid_cyc = -10;
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      e = expq.pop_front();
      for (int x = 0; x < Q; x++)
        check(longint'($signed(out_msg[x])) == e.msg[x],
              $sformatf("out %0d x=%0d got %0d want %0d", outs, x, out_msg[x], e.msg[x]));
      check(out_last == e.last, "out_last");
      if (outs % DC == 0 && last_in_cyc.size() > 0) begin
        int t;
        t = last_in_cyc.pop_front();
        check(cyc - t == 2, $sformatf("latency %0d", cyc - t));
      end
      if (streaming && outs > 0 && outs < (NODES / 2) * DC) check(cyc - prev_valid_cyc == 1, "output gap in stream");
      prev_valid_cyc = cyc;
      outs++;
    end
  end

  initial begin
    longint in[DC][Q];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      for (int j = 0; j < DC; j++)
        for (int x = 0; x < Q; x++) begin
          if (x == 0) in[j][x] = (n % 9 == 5 && j == 1) ? -longint'($urandom_range(ONE)) :
                                 (n % 13 == 2) ? 0 : $urandom_range(ONE, ONE / 4);
          else        in[j][x] = longint'($urandom_range(2 * ONE)) - ONE;
        end
      model(in);
      if (n >= NODES / 2) begin
        streaming = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int j = 0; j < DC; j++) begin
        in_valid = 1;
        for (int x = 0; x < Q; x++) in_msg[x] = FW'(in[j][x]);
        if (j == DC - 1) last_in_cyc.push_back(cyc + 1);
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    check(outs == NODES * DC, $sformatf("output count %0d", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
