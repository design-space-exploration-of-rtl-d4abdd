// tb_tpn_decoder: self-checking test of the thread-per-node decoder on a
// small code. A random quasi-cyclic code (8 x 8 circulants, 4 x 8 base
// matrix, dual-diagonal parity part) is expanded into an explicit edge list:
// edges numbered in VN order, plus the list of edges in CN order. Several
// encoded frames, each with one weak channel error and some saturated LLRs,
// are decoded one after another; every decision is compared with the
// fixed-point reference schedule (same min-sum arithmetic, same pass order)
// and with the transmitted codeword. Each decode's cycle count is bounded by
// (2I+1) passes of E edges plus the drain, and the kernel launches are
// counted.
module tb_tpn_decoder;
  import qc_code_pkg::*;

  localparam int unsigned Z = 8, MB = 4, NBC = 8, N = Z * NBC, EMAX = 256;
  localparam int unsigned ITERS = 5, NF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     cfg_cn_we = 0, cfg_cn_last = 0, cfg_vn_we = 0, cfg_vn_last = 0, llr_we = 0, start = 0;
  logic [$clog2(EMAX)-1:0]  cfg_cn_addr = 0, cfg_cn_edge = 0, cfg_vn_addr = 0;
  logic [$clog2(N)-1:0]     llr_addr = 0, dec_addr = 0;
  logic [7:0]               llr_data = 0;
  logic [$clog2(EMAX+1)-1:0] num_edges = 0;
  logic [5:0]               num_iter = ITERS, iter;
  logic                     busy, done, kernel_start, kernel_cn, dec_data;

  tpn_decoder #(.N(N), .E(EMAX)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_cycles = 0, cn_launch = 0, vn_launch = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (kernel_start) begin
      if (kernel_cn) cn_launch++;
      else           vn_launch++;
    end
  end

  qc_code code;
  int vn_edges;
  bit vn_last_q[$];
  int cn_list[$];
  bit cn_last_q[$];

  // expand the base matrix into explicit edges
  task automatic expand();
    int cnl[int][$];
    int id, k, c;
    id = 0;
    for (int col = 0; col < NBC; col++) begin
      int ks[$];
      ks.delete();
      foreach (code.col_list[i]) if (code.ent_col[code.col_list[i]] == col) ks.push_back(code.col_list[i]);
      for (int j = 0; j < Z; j++) begin
        foreach (ks[i]) begin
          k = ks[i];
          c = (j + code.ent_shift[k]) % Z;
          check(code.vn_of(k, c) == col * Z + j, "edge expansion");
          cnl[code.ent_row[k] * Z + c].push_back(id);
          vn_last_q.push_back(i == ks.size() - 1);
          id++;
        end
      end
    end
    vn_edges = id;
    for (int r = 0; r < MB * Z; r++)
      foreach (cnl[r][i]) begin
        cn_list.push_back(cnl[r][i]);
        cn_last_q.push_back(i == cnl[r].size() - 1);
      end
  endtask

  initial begin
    bit cw[], ref_d[];
    int llr[], err_pos, lo, hi, good;
    code = new(Z, MB, NBC);
    code.build();
    expand();
    check(vn_edges == code.e * Z && cn_list.size() == vn_edges, "edge count");
    repeat (3) @(negedge clk);
    rst_n = 1;
    num_edges = vn_edges;
    for (int i = 0; i < vn_edges; i++) begin
      cfg_cn_we = 1; cfg_cn_addr = i; cfg_cn_edge = cn_list[i]; cfg_cn_last = cn_last_q[i];
      cfg_vn_we = 1; cfg_vn_addr = i; cfg_vn_last = vn_last_q[i];
      @(negedge clk);
    end
    cfg_cn_we = 0; cfg_vn_we = 0;
    for (int f = 0; f < NF; f++) begin
      code.encode(cw);
      llr = new[N];
      err_pos = $urandom_range((NBC - MB) * Z - 1);
      foreach (llr[i]) begin
        int mag;
        bit b;
        mag = $urandom_range(20, 6);
        b = cw[i];
        if (i == err_pos) begin b = !b; mag = 3; end
        llr[i] = b ? -mag : mag;
        if (f == NF - 1 && i < 2) llr[i] = cw[i] ? -128 : 127;
      end
      code.decode(llr, ITERS, ref_d);
      for (int i = 0; i < N; i++) begin
        llr_we = 1; llr_addr = i; llr_data = 8'(llr[i]);
        @(negedge clk);
      end
      llr_we = 0;
      busy_cycles = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      lo = (2 * ITERS + 1) * vn_edges;
      hi = (2 * ITERS + 1) * (vn_edges + 2 * 11 + 12) + 4;
      check(busy_cycles >= lo && busy_cycles <= hi, $sformatf("decode time %0d outside [%0d,%0d]", busy_cycles, lo, hi));
      @(negedge clk);
      good = 1;
      for (int i = 0; i < N; i++) begin
        dec_addr = i;
        @(negedge clk);
        check(dec_data == ref_d[i], $sformatf("frame %0d bit %0d: got %0d ref %0d", f, i, dec_data, ref_d[i]));
        if (dec_data != cw[i]) good = 0;
      end
      check(good == 1, $sformatf("frame %0d not corrected", f));
    end
    check(cn_launch == NF * ITERS && vn_launch == NF * (ITERS + 1), $sformatf("kernel launches cn %0d vn %0d", cn_launch, vn_launch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
