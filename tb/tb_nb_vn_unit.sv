// tb_nb_vn_unit: drives random pmf groups (DV incoming pmfs plus a channel
// pmf per variable node) into nb_vn_unit, with random idle gaps, some
// negative and out-of-range inputs, and groups with in_zero set. A
// reference model in this file computes each outgoing pmf (channel pmf times
// the other incoming pmfs, 15 fractional bits, normalized by the sum) and
// the decided symbol; every output is compared. It also checks that the
// first output of a node comes two cycles after its last input and that a
// back-to-back input stream gives a back-to-back output stream.
module tb_nb_vn_unit;
  localparam int M = 4, DV = 2, FW = 18, Q = 1 << M, ONE = 1 << 15;
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

  logic in_valid = 0, in_zero = 0, out_valid, out_last;
  logic signed [Q-1:0][FW-1:0] in_msg = '0, in_mv = '0, out_msg;
  logic [M-1:0] out_dec;
  nb_vn_unit #(.M(M), .DV(DV), .FW(FW)) dut (.*);

  typedef struct { longint msg[Q]; bit last; int dec; } exp_t;
  exp_t expq[$];
  int last_in_cyc[$];
  int cyc = 0, outs = 0, gaps_out = 0, streaming = 1;
  always @(posedge clk) cyc++;

  function automatic longint clampp(longint v);
    return (v < 0) ? 0 : (v > ONE) ? ONE : v;
  endfunction

  task automatic model(longint in[DV][Q], longint mv[Q], bit zero);
    longint a[DV][Q], app[Q], sum;
    int best;
    for (int j = 0; j < DV; j++) for (int x = 0; x < Q; x++) a[j][x] = zero ? ONE : clampp(in[j][x]);
    best = 0;
    for (int x = 0; x < Q; x++) begin
      app[x] = clampp(mv[x]);
      for (int j = 0; j < DV; j++) app[x] = (app[x] * a[j][x]) >> 15;
      if (app[x] > app[best]) best = x;
    end
    for (int k = 0; k < DV; k++) begin
      exp_t e;
      longint p[Q];
      sum = 0;
      for (int x = 0; x < Q; x++) begin
        p[x] = clampp(mv[x]);
        for (int j = 0; j < DV; j++) if (j != k) p[x] = (p[x] * a[j][x]) >> 15;
        sum += p[x];
      end
      for (int x = 0; x < Q; x++) e.msg[x] = (sum == 0) ? ONE / Q : (p[x] << 15) / sum;
      e.last = (k == DV - 1);
      e.dec = best;
      expq.push_back(e);
    end
  endtask

  function automatic longint rnd_prob(int mode);
    case (mode)
      0: return $urandom_range(ONE);
      1: return $urandom_range(300);
      2: return -longint'($urandom_range(1000));
      default: return ONE + $urandom_range(1000);
    endcase
  endfunction

  // checker
  int prev_valid_cyc = -10;
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      e = expq.pop_front();
      for (int x = 0; x < Q; x++)
        check(longint'(out_msg[x]) == e.msg[x],
              $sformatf("out %0d x=%0d got %0d want %0d", outs, x, out_msg[x], e.msg[x]));
      check(out_last == e.last, "out_last");
      if (e.last) check(out_dec == M'(e.dec), $sformatf("dec got %0d want %0d", out_dec, e.dec));
      if (outs % DV == 0 && last_in_cyc.size() > 0) begin
        int t;
        t = last_in_cyc.pop_front();
        check(cyc - t == 2, $sformatf("latency %0d", cyc - t));
      end
      if (streaming && outs > 0 && outs < (NODES / 2) * DV) check(cyc - prev_valid_cyc == 1, "output gap in stream");
      prev_valid_cyc = cyc;
      outs++;
    end
  end

  initial begin
    longint in[DV][Q], mv[Q];
    int mode;
    bit zero;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      mode = (n % 7 == 3) ? 3 : (n % 5 == 1) ? 2 : (n % 3 == 2) ? 1 : 0;
      zero = (n % 11 == 4);
      for (int x = 0; x < Q; x++) begin
        mv[x] = rnd_prob(x % 2 == 0 ? mode : 0);
        for (int j = 0; j < DV; j++) in[j][x] = rnd_prob((x + j) % 3 == 0 ? mode : 0);
      end
      model(in, mv, zero);
      if (n >= NODES / 2) begin
        streaming = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int j = 0; j < DV; j++) begin
        in_valid = 1; in_zero = zero;
        for (int x = 0; x < Q; x++) begin
          in_msg[x] = FW'(in[j][x]);
          in_mv[x]  = (j == 0) ? FW'(mv[x]) : FW'($urandom);
        end
        if (j == DV - 1) last_in_cyc.push_back(cyc + 1);
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    check(outs == NODES * DV, $sformatf("output count %0d", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
