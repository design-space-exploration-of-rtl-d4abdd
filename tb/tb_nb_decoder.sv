// tb_nb_decoder: builds a random (2,3)-regular non-binary code over GF(2^M)
// around a random codeword: for every check node the first two edge
// coefficients are drawn at random and the third is solved so that the
// check holds (GF arithmetic written out here, independent of the RTL). The
// channel pmfs favour the transmitted symbol, except for one symbol per
// frame that favours a wrong value. After decoding, every symbol decision
// must equal the codeword. Two decoder instances run side by side: GF(4)
// with 384 symbols (a 768-bit code, the size of the GF(4) reference
// workload) and GF(16) with 12 symbols. The decoding time is checked against
// (2*iterations + 1) passes of E edges plus a bounded drain per pass.
module tb_nb_decoder;
  localparam int unsigned ITERS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit c, string w);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- GF(2^m) arithmetic of the testbench ----------
  function automatic int poly(int m);
    return (m == 2) ? 'h7 : (m == 3) ? 'hb : 'h13;
  endfunction
  function automatic int mul(int a, int b, int m);
    int r = 0;
    for (int i = 0; i < m; i++) begin
      if ((b >> i) & 1) r ^= a;
      a <<= 1;
      if ((a >> m) & 1) a ^= poly(m);
    end
    return r;
  endfunction
  function automatic int inv(int a, int m);
    for (int x = 1; x < (1 << m); x++) if (mul(a, x, m) == 1) return x;
    return 0;
  endfunction

  // ---------- two decoders: GF(4) with 384 symbols and GF(16) with 12 ----------
  localparam int unsigned NSA = 384, EA = NSA * 2, NSB = 12, EB = NSB * 2;

  logic        a_h_we = 0, a_cn_we = 0, a_mv_we = 0, a_start = 0, a_busy, a_done, a_ps, a_pc;
  logic [9:0]  a_h_addr = 0, a_cn_addr = 0, a_cn_edge = 0;
  logic [1:0]  a_h = 0, a_dec;
  logic [8:0]  a_mv_addr = 0, a_dec_addr = 0;
  logic [3:0][17:0] a_mv = 0;
  logic [5:0]  a_iter;
  nb_decoder #(.M(2), .NSYM(NSA)) u_a (
    .clk, .rst_n, .cfg_h_we(a_h_we), .cfg_h_addr(a_h_addr), .cfg_h(a_h),
    .cfg_cn_we(a_cn_we), .cfg_cn_addr(a_cn_addr), .cfg_cn_edge(a_cn_edge),
    .mv_we(a_mv_we), .mv_addr(a_mv_addr), .mv_data(a_mv), .num_iter(6'(ITERS)),
    .start(a_start), .busy(a_busy), .done(a_done), .phase_start(a_ps), .phase_cn(a_pc),
    .iter(a_iter), .dec_addr(a_dec_addr), .dec_data(a_dec)
  );

  logic        b_h_we = 0, b_cn_we = 0, b_mv_we = 0, b_start = 0, b_busy, b_done, b_ps, b_pc;
  logic [4:0]  b_h_addr = 0, b_cn_addr = 0, b_cn_edge = 0;
  logic [3:0]  b_h = 0, b_dec;
  logic [3:0]  b_mv_addr = 0, b_dec_addr = 0;
  logic [15:0][17:0] b_mv = 0;
  logic [5:0]  b_iter;
  nb_decoder #(.M(4), .NSYM(NSB)) u_b (
    .clk, .rst_n, .cfg_h_we(b_h_we), .cfg_h_addr(b_h_addr), .cfg_h(b_h),
    .cfg_cn_we(b_cn_we), .cfg_cn_addr(b_cn_addr), .cfg_cn_edge(b_cn_edge),
    .mv_we(b_mv_we), .mv_addr(b_mv_addr), .mv_data(b_mv), .num_iter(6'(ITERS)),
    .start(b_start), .busy(b_busy), .done(b_done), .phase_start(b_ps), .phase_cn(b_pc),
    .iter(b_iter), .dec_addr(b_dec_addr), .dec_data(b_dec)
  );

  // code construction: returns codeword, coefficients per edge, CN edge list
  task automatic make_code(int m, int ns, output int cw[], output int h[], output int cn[]);
    int perm[];
    int q = 1 << m;
    int E = 2 * ns;
    perm = new[E];
    cw = new[ns];
    h = new[E];
    cn = new[E];
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    foreach (cw[v]) cw[v] = $urandom_range(q - 1, 1);
    for (int c = 0; c < E / 3; c++) begin
      int e0, e1, e2, s;
      e0 = perm[3 * c]; e1 = perm[3 * c + 1]; e2 = perm[3 * c + 2];
      do begin
        h[e0] = $urandom_range(q - 1, 1);
        h[e1] = $urandom_range(q - 1, 1);
        s = mul(h[e0], cw[e0 / 2], m) ^ mul(h[e1], cw[e1 / 2], m);
      end while (s == 0);
      h[e2] = mul(s, inv(cw[e2 / 2], m), m);
      cn[3 * c] = e0; cn[3 * c + 1] = e1; cn[3 * c + 2] = e2;
      checks++;
      if ((mul(h[e0], cw[e0 / 2], m) ^ mul(h[e1], cw[e1 / 2], m) ^ mul(h[e2], cw[e2 / 2], m)) != 0)
        failures++;
    end
  endtask

  function automatic int pmf_val(int x, int truth, int bad, int q);
    // probabilities in 1/32768 units
    if (bad >= 0) return (x == bad) ? 13000 : (x == truth) ? 9000 : (32768 - 22000) / (q - 2);
    return (x == truth) ? 24000 : 8768 / (q - 1);
  endfunction

  int cwa[], ha[], cna[], cwb[], hb[], cnb[];
  int cyc_a = 0, cyc_b = 0, ph_a = 0, ph_b = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_busy) cyc_a++;
    if (b_busy) cyc_b++;
    if (a_ps) ph_a++;
    if (b_ps) ph_b++;
  end

  initial begin
    int bad_a, bad_b;
    make_code(2, NSA, cwa, ha, cna);
    make_code(4, NSB, cwb, hb, cnb);
    bad_a = $urandom_range(NSA - 1);
    bad_b = $urandom_range(NSB - 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < EA; i++) begin
      a_h_we = 1; a_h_addr = 10'(i); a_h = 2'(ha[i]);
      a_cn_we = 1; a_cn_addr = 10'(i); a_cn_edge = 10'(cna[i]);
      b_h_we = (i < EB); b_cn_we = (i < EB);
      if (i < EB) begin
        b_h_addr = 5'(i); b_h = 4'(hb[i]);
        b_cn_addr = 5'(i); b_cn_edge = 5'(cnb[i]);
      end
      a_mv_we = (i < NSA);
      if (i < NSA) begin
        a_mv_addr = 9'(i);
        for (int x = 0; x < 4; x++)
          a_mv[x] = 18'(pmf_val(x, cwa[i], (i == bad_a) ? cwa[i] ^ 1 : -1, 4));
      end
      b_mv_we = (i < NSB);
      if (i < NSB) begin
        b_mv_addr = 4'(i);
        for (int x = 0; x < 16; x++)
          b_mv[x] = 18'(pmf_val(x, cwb[i], (i == bad_b) ? cwb[i] ^ 5 : -1, 16));
      end
      @(negedge clk);
    end
    a_h_we = 0; a_cn_we = 0; b_h_we = 0; b_cn_we = 0;
    a_start = 1; b_start = 1;
    @(negedge clk);
    a_start = 0; b_start = 0;
    while (!(a_done)) @(negedge clk);
    @(negedge clk);
    for (int v = 0; v < NSA; v++) begin
      a_dec_addr = 9'(v); b_dec_addr = 4'(v % NSB);
      @(negedge clk);
      check(a_dec == cwa[v], $sformatf("GF(4) symbol %0d: got %0d want %0d", v, a_dec, cwa[v]));
      if (v < NSB) check(b_dec == cwb[v], $sformatf("GF(16) symbol %0d: got %0d want %0d", v, b_dec, cwb[v]));
    end
    check(ph_a == 2 * ITERS + 1 && ph_b == 2 * ITERS + 1, "number of passes");
    check(cyc_a >= (2 * ITERS + 1) * EA && cyc_a <= (2 * ITERS + 1) * (EA + 12),
          $sformatf("GF(4) decode took %0d cycles", cyc_a));
    check(cyc_b >= (2 * ITERS + 1) * EB && cyc_b <= (2 * ITERS + 1) * (EB + 12),
          $sformatf("GF(16) decode took %0d cycles", cyc_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
