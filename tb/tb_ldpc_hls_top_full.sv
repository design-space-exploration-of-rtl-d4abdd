// tb_ldpc_hls_top_full: the end-to-end test of ldpc_hls_top at the full
// size of the reference workloads, with the top instantiated without parameter
// overrides: a 360-lane binary decoder on a 64800-bit quasi-cyclic code with
// a 90 x 180 base matrix of 360 x 360 circulants (the DVB-S2 normal-frame
// geometry, rate 1/2, with column weight 3 in the information part and a
// dual-diagonal parity part), and the GF(16) decoder on a 384-symbol
// (1536-bit) (2,3)-regular code. Two binary frames with one weak channel
// error each are streamed through with random gaps and back-pressure and
// compared bit for bit with the fixed-point reference schedule and the
// transmitted codeword; the non-binary decisions are compared with the
// transmitted codeword. The thread-per-node decoder decodes one frame of a
// 1944-bit code (24 x 12 base matrix of 81 x 81 circulants, the WiFi code
// geometry) and is compared with the reference schedule. All run 10 iterations. Each mechanism is counted as in tb_ldpc_hls_top,
// and each binary frame's decoding time is bounded by (2I+1) phases of e
// edges plus the drain.
module tb_ldpc_hls_top_full;
  import qc_code_pkg::*;

  localparam int unsigned LANES = 360;
  localparam int unsigned NB    = 180;
  localparam int unsigned MB    = 90;
  localparam int unsigned EB    = 630;
  localparam int unsigned NF    = 2;
  localparam int unsigned NSYM  = 384;
  localparam int unsigned WDOG  = 400000;
  localparam int unsigned TZ    = 81;
  localparam int unsigned TMB   = 12;
  localparam int unsigned TNB   = 24;
  localparam int unsigned TN    = TZ * TNB;
  localparam int unsigned TE    = 7776;

  localparam int unsigned ITERS = 10;
  localparam int unsigned NM    = 4;
  localparam int unsigned NQ    = 1 << NM;
  localparam int unsigned NE    = 2 * NSYM;
  localparam int unsigned NITER = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // binary decoder ports
  logic                        df_cfg_ent_we = 0, df_cfg_ent_row_last = 0, df_cfg_col_we = 0, df_cfg_col_last = 0;
  logic [$clog2(EB)-1:0]       df_cfg_ent_addr = 0, df_cfg_col_addr = 0, df_cfg_col_k = 0;
  logic [$clog2(NB)-1:0]       df_cfg_ent_col = 0;
  logic [$clog2(LANES)-1:0]    df_cfg_ent_shift = 0;
  logic [$clog2(EB+1)-1:0]     df_num_edges = 0;
  logic [$clog2(NB+1)-1:0]     df_num_cols = NB;
  logic [5:0]                  df_num_iter = ITERS;
  logic                        df_in_valid = 0, df_in_ready, df_out_valid, df_out_ready = 0, df_out_last;
  logic [LANES-1:0][7:0]       df_in_data = '0;
  logic [LANES-1:0]            df_out_data;
  logic                        df_core_busy, df_core_done, df_phase_start, df_phase_vn;
  logic [5:0]                  df_iter;
  logic [1:0]                  df_llr_full, df_dec_full;
  // non-binary decoder ports
  logic                        nb_cfg_h_we = 0, nb_cfg_cn_we = 0, nb_mv_we = 0, nb_start = 0;
  logic [$clog2(NE)-1:0]       nb_cfg_h_addr = 0, nb_cfg_cn_addr = 0, nb_cfg_cn_edge = 0;
  logic [NM-1:0]               nb_cfg_h = 0, nb_dec_data;
  logic [$clog2(NSYM)-1:0]     nb_mv_addr = 0, nb_dec_addr = 0;
  logic [NQ-1:0][17:0]         nb_mv_data = '0;
  logic [5:0]                  nb_num_iter = NITER, nb_iter;
  logic                        nb_busy, nb_done, nb_phase_start, nb_phase_cn;

  // thread-per-node decoder ports
  logic                          tpn_cfg_cn_we = 0, tpn_cfg_cn_last = 0, tpn_cfg_vn_we = 0, tpn_cfg_vn_last = 0;
  logic                          tpn_llr_we = 0, tpn_start = 0;
  logic [$clog2(TE)-1:0]         tpn_cfg_cn_addr = 0, tpn_cfg_cn_edge = 0, tpn_cfg_vn_addr = 0;
  logic [$clog2(TN)-1:0]         tpn_llr_addr = 0, tpn_dec_addr = 0;
  logic [7:0]                    tpn_llr_data = 0;
  logic [$clog2(TE+1)-1:0]       tpn_num_edges = 0;
  logic [5:0]                    tpn_num_iter = ITERS, tpn_iter;
  logic                          tpn_busy, tpn_done, tpn_kernel_start, tpn_kernel_cn, tpn_dec_data;

  ldpc_hls_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- non-binary code construction ----------------
  function automatic int gmul(int a, int b);
    int r = 0;
    for (int i = 0; i < NM; i++) begin
      if ((b >> i) & 1) r ^= a;
      a <<= 1;
      if ((a >> NM) & 1) a ^= 'h13;
    end
    return r;
  endfunction
  function automatic int ginv(int a);
    for (int x = 1; x < NQ; x++) if (gmul(a, x) == 1) return x;
    return 0;
  endfunction
  int ncw[NSYM], nh[NE], ncn[NE];
  task automatic make_nb_code();
    int perm[NE];
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    foreach (ncw[v]) ncw[v] = $urandom_range(NQ - 1, 1);
    for (int c = 0; c < NE / 3; c++) begin
      int e0, e1, e2, s;
      e0 = perm[3 * c]; e1 = perm[3 * c + 1]; e2 = perm[3 * c + 2];
      do begin
        nh[e0] = $urandom_range(NQ - 1, 1);
        nh[e1] = $urandom_range(NQ - 1, 1);
        s = gmul(nh[e0], ncw[e0 / 2]) ^ gmul(nh[e1], ncw[e1 / 2]);
      end while (s == 0);
      nh[e2] = gmul(s, ginv(ncw[e2 / 2]));
      ncn[3 * c] = e0; ncn[3 * c + 1] = e1; ncn[3 * c + 2] = e2;
    end
  endtask

  // ---------------- mechanism counters ----------------
  qc_code code;
  int busy_cycles = 0, frames_done = 0, in_while_busy = 0, cn_phases = 0, vn_phases = 0;
  int cyc = 0, tpn_cn_k = 0, tpn_vn_k = 0;
  int out_stalls = 0, nb_vn_passes = 0, nb_cn_passes = 0, rotated = 0, lo_t, hi_t;
  always @(posedge clk) if (rst_n) begin
    if (df_core_busy) busy_cycles++;
    if (df_core_done) begin
      lo_t = (2 * ITERS + 1) * code.e;
      hi_t = (2 * ITERS + 1) * (code.e + 22) + 4;
      check(busy_cycles >= lo_t && busy_cycles <= hi_t,
            $sformatf("decode time %0d outside [%0d,%0d]", busy_cycles, lo_t, hi_t));
      busy_cycles = 0;
      frames_done++;
    end
    if (df_in_valid && df_in_ready && df_core_busy) in_while_busy++;
    if (df_phase_start) begin
      if (df_phase_vn) vn_phases++;
      else             cn_phases++;
    end
    if (df_out_valid && !df_out_ready) out_stalls++;
    cyc++;
    if (tpn_kernel_start) begin
      if (tpn_kernel_cn) tpn_cn_k++;
      else               tpn_vn_k++;
    end
    if (nb_phase_start) begin
      if (nb_phase_cn) nb_cn_passes++;
      else             nb_vn_passes++;
    end
  end

  bit cw   [NF][];
  int llr  [NF][];
  bit ref_d[NF][];

  initial begin
    int good, err_pos, bad;
    code = new(LANES, MB, NB);
    code.build();
    df_num_edges = code.e;
    for (int k = 0; k < code.e; k++) if (code.ent_shift[k] != 0) rotated++;
    for (int f = 0; f < NF; f++) begin
      code.encode(cw[f]);
      llr[f] = new[NB * LANES];
      err_pos = $urandom_range((NB - MB) * LANES - 1);
      foreach (llr[f][i]) begin
        int mag;
        bit b;
        mag = $urandom_range(20, 6);
        b   = cw[f][i];
        if (i == err_pos) begin b = !b; mag = 3; end
        llr[f][i] = b ? -mag : mag;
      end
      code.decode(llr[f], ITERS, ref_d[f]);
    end
    make_nb_code();
    bad = $urandom_range(NSYM - 1);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < (code.e > NE ? code.e : NE); k++) begin
      df_cfg_ent_we = (k < code.e); df_cfg_col_we = (k < code.e);
      if (k < code.e) begin
        df_cfg_ent_addr = k; df_cfg_ent_col = code.ent_col[k];
        df_cfg_ent_shift = code.ent_shift[k]; df_cfg_ent_row_last = code.row_last[k];
        df_cfg_col_addr = k; df_cfg_col_k = code.col_list[k]; df_cfg_col_last = code.col_last[k];
      end
      nb_cfg_h_we = (k < NE); nb_cfg_cn_we = (k < NE); nb_mv_we = (k < NSYM);
      if (k < NE) begin
        nb_cfg_h_addr = k; nb_cfg_h = nh[k]; nb_cfg_cn_addr = k; nb_cfg_cn_edge = ncn[k];
      end
      if (k < NSYM) begin
        nb_mv_addr = k;
        for (int x = 0; x < NQ; x++)
          if (k == bad) nb_mv_data[x] = (x == (ncw[k] ^ 5)) ? 13000 : (x == ncw[k]) ? 9000 : 766;
          else          nb_mv_data[x] = (x == ncw[k]) ? 24000 : 584;
      end
      @(negedge clk);
    end
    df_cfg_ent_we = 0; df_cfg_col_we = 0; nb_cfg_h_we = 0; nb_cfg_cn_we = 0; nb_mv_we = 0;
    nb_start = 1;
    @(negedge clk);
    nb_start = 0;

    fork
      begin : producer
        bit rdy;
        for (int f = 0; f < NF; f++) begin
          for (int j = 0; j < NB; j++) begin
            df_in_valid = 0;
            while ($urandom_range(3) == 0) @(negedge clk);
            df_in_valid = 1;
            for (int d = 0; d < LANES; d++) df_in_data[d] = 8'(llr[f][j * LANES + d]);
            do begin
              rdy = df_in_ready;
              @(negedge clk);
            end while (!rdy);
          end
        end
        df_in_valid = 0;
      end
      begin : consumer
        bit got, lst;
        logic [LANES-1:0] data;
        for (int f = 0; f < NF; f++) begin
          good = 1;
          for (int j = 0; j < NB; j++) begin
            do begin
              df_out_ready = ($urandom_range(2) != 0);
              got  = df_out_valid && df_out_ready;
              data = df_out_data;
              lst  = df_out_last;
              @(negedge clk);
            end while (!got);
            for (int d = 0; d < LANES; d++) begin
              check(data[d] == ref_d[f][j * LANES + d],
                    $sformatf("frame %0d bit %0d differs from reference", f, j * LANES + d));
              if (data[d] != cw[f][j * LANES + d]) good = 0;
            end
            check(lst == (j == NB - 1), "out_last position");
          end
          check(good == 1, $sformatf("binary frame %0d not corrected", f));
        end
        df_out_ready = 0;
      end
      begin : tpn_side
        qc_code tc;
        int cnl[int][$], ks[$], cn_list[$], id, k, c, ne, good, llr[], err_pos, t0;
        bit vlast[$], clast[$], tcw[], tref[];
        tc = new(TZ, TMB, TNB);
        tc.build();
        id = 0;
        for (int col = 0; col < TNB; col++) begin
          ks.delete();
          foreach (tc.col_list[i]) if (tc.ent_col[tc.col_list[i]] == col) ks.push_back(tc.col_list[i]);
          for (int j = 0; j < TZ; j++)
            foreach (ks[i]) begin
              k = ks[i];
              c = (j + tc.ent_shift[k]) % TZ;
              cnl[tc.ent_row[k] * TZ + c].push_back(id);
              vlast.push_back(i == ks.size() - 1);
              id++;
            end
        end
        ne = id;
        for (int r = 0; r < TMB * TZ; r++)
          foreach (cnl[r][i]) begin cn_list.push_back(cnl[r][i]); clast.push_back(i == cnl[r].size() - 1); end
        tc.encode(tcw);
        llr = new[TN];
        err_pos = $urandom_range((TNB - TMB) * TZ - 1);
        foreach (llr[i]) begin
          int mag;
          bit b;
          mag = $urandom_range(20, 6);
          b = tcw[i];
          if (i == err_pos) begin b = !b; mag = 3; end
          llr[i] = b ? -mag : mag;
        end
        tc.decode(llr, ITERS, tref);
        tpn_num_edges = ne;
        for (int i = 0; i < ne; i++) begin
          tpn_cfg_cn_we = 1; tpn_cfg_cn_addr = i; tpn_cfg_cn_edge = cn_list[i]; tpn_cfg_cn_last = clast[i];
          tpn_cfg_vn_we = 1; tpn_cfg_vn_addr = i; tpn_cfg_vn_last = vlast[i];
          tpn_llr_we = (i < TN);
          if (i < TN) begin tpn_llr_addr = i; tpn_llr_data = 8'(llr[i]); end
          @(negedge clk);
        end
        tpn_cfg_cn_we = 0; tpn_cfg_vn_we = 0; tpn_llr_we = 0;
        tpn_start = 1;
        t0 = cyc;
        @(negedge clk);
        tpn_start = 0;
        while (!tpn_done) @(negedge clk);
        check(cyc - t0 >= (2 * ITERS + 1) * ne && cyc - t0 <= (2 * ITERS + 1) * (ne + 34) + 8,
              $sformatf("thread-per-node decode time %0d", cyc - t0));
        @(negedge clk);
        good = 1;
        for (int i = 0; i < TN; i++) begin
          tpn_dec_addr = i;
          @(negedge clk);
          check(tpn_dec_data == tref[i], $sformatf("thread-per-node bit %0d differs from reference", i));
          if (tpn_dec_data != tcw[i]) good = 0;
        end
        check(good == 1, "thread-per-node frame not corrected");
      end
      begin : nb_reader
        while (!nb_done) @(negedge clk);
        @(negedge clk);
        for (int v = 0; v < NSYM; v++) begin
          nb_dec_addr = v;
          @(negedge clk);
          check(nb_dec_data == NM'(ncw[v]), $sformatf("GF(16) symbol %0d: got %0d want %0d",
                                                      v, nb_dec_data, ncw[v]));
        end
      end
    join

    $display("mechanisms: frames=%0d overlap=%0d cn_phases=%0d vn_phases=%0d rotated=%0d stalls=%0d nb_vn=%0d nb_cn=%0d tpn_cn=%0d tpn_vn=%0d",
             frames_done, in_while_busy, cn_phases, vn_phases, rotated, out_stalls, nb_vn_passes, nb_cn_passes, tpn_cn_k, tpn_vn_k);
    check(frames_done == NF, "every binary frame decoded once");
    check(cn_phases == NF * ITERS, "check-node phases");
    check(vn_phases == NF * (ITERS + 1), "variable-node phases");
    check(in_while_busy > 0, "frame input overlapped with decoding");
    check(rotated > 0, "rotated circulants exercised");
    check(out_stalls > 0, "output back-pressure exercised");
    check(nb_vn_passes == NITER + 1 && nb_cn_passes == NITER, "non-binary passes");
    check(tpn_cn_k == ITERS && tpn_vn_k == ITERS + 1, $sformatf("thread-per-node kernel launches %0d/%0d", tpn_cn_k, tpn_vn_k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
