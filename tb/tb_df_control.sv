// tb_df_control: loads the base-matrix tables of a small random
// quasi-cyclic code, runs a decode and checks the controller's schedule:
// 2*iterations+1 phases (the first a VN phase with zeroed CN messages), the
// bank read order (row-major in CN phases, column-major in VN phases), the
// node boundaries, the read rotation (the circulant shift in VN phases, none
// in CN phases), and that every returned message is written back to the
// address it was read from with the inverse rotation. The functional units
// are replaced by a fixed four-cycle delay line, which keeps the order.
module tb_df_control;
  import ldpc_pkg::*;
  import qc_code_pkg::*;
  localparam int unsigned LANES = 6, NB = 6, EB = 20, ITERS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_ent_we = 0, cfg_ent_row_last = 0, cfg_col_we = 0, cfg_col_last = 0;
  logic [4:0] cfg_ent_addr = 0, cfg_col_addr = 0, cfg_col_k = 0;
  logic [2:0] cfg_ent_col = 0, cfg_ent_shift = 0;
  logic [4:0] num_edges;
  logic [5:0] num_iter = ITERS;
  logic start = 0, busy, done, rd_en, fu_valid, fu_first, fu_last, fu_zero;
  logic [4:0] rd_addr, wr_addr;
  logic [2:0] llr_addr, rd_shift, wr_shift, dec_addr;
  fu_mode_e   fu_mode;
  logic       fu_out_valid, fu_out_last, wr_en, dec_we, phase_start;
  logic [5:0] iter;
  df_control #(.LANES(LANES), .NB(NB), .EB(EB)) dut (.*);

  // functional-unit stand-in: delay line
  logic [3:0] dv = 0, dl = 0;
  always_ff @(posedge clk) begin
    dv <= rst_n ? {dv[2:0], fu_valid} : 4'b0;
    dl <= {dl[2:0], fu_last};
  end
  assign fu_out_valid = dv[3];
  assign fu_out_last  = dl[3];

  int checks = 0, failures = 0;
  qc_code code;
  int exp_k[$], exp_s[$], exp_wk[$], exp_ws[$];
  bit exp_f[$], exp_l[$];
  int phases = 0, zero_phases = 0, dec_writes = 0, cycles = 0, ph_mode[$];

  task automatic check(bit c, string w);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected order of one phase
  task automatic expect_phase(bit vn);
    for (int t = 0; t < code.e; t++) begin
      int k = vn ? code.col_list[t] : t;
      exp_k.push_back(k);
      exp_s.push_back(vn ? code.ent_shift[k] : 0);
      exp_l.push_back(vn ? code.col_last[t] : code.row_last[k]);
      exp_f.push_back(t == 0 || (vn ? code.col_last[t - 1] : code.row_last[t - 1]));
      exp_wk.push_back(k);
      exp_ws.push_back(vn ? (LANES - code.ent_shift[k]) % LANES : 0);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (phase_start) begin phases++; ph_mode.push_back(fu_mode); end
    if (fu_valid) begin
      check(exp_k.size() > 0, "unexpected read");
      if (exp_k.size() > 0) begin
        check(rd_shift == exp_s[0] && fu_last == exp_l[0] && fu_first == exp_f[0],
              $sformatf("stage1 k=%0d shift %0d/%0d last %0d/%0d first %0d/%0d", exp_k[0],
                        rd_shift, exp_s[0], fu_last, exp_l[0], fu_first, exp_f[0]));
        if (fu_zero) zero_phases++;
        void'(exp_k.pop_front()); void'(exp_s.pop_front()); void'(exp_l.pop_front());
        void'(exp_f.pop_front());
      end
    end
    if (rd_en) check(exp_k.size() > 0 && rd_addr == exp_k[0] ||
                     (exp_k.size() > 1 && fu_valid && rd_addr == exp_k[1]),
                     $sformatf("read address %0d", rd_addr));
    if (wr_en) begin
      check(exp_wk.size() > 0 && wr_addr == exp_wk[0] && wr_shift == exp_ws[0],
            $sformatf("write-back address %0d shift %0d", wr_addr, wr_shift));
      if (exp_wk.size()) begin void'(exp_wk.pop_front()); void'(exp_ws.pop_front()); end
    end
    if (dec_we) dec_writes++;
  end

  initial begin
    code = new(LANES, 3, NB);
    code.build();
    num_edges = 5'(code.e);
    for (int p = 0; p <= 2 * ITERS; p++) expect_phase(p % 2 == 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < code.e; k++) begin
      cfg_ent_we = 1; cfg_ent_addr = 5'(k); cfg_ent_col = 3'(code.ent_col[k]);
      cfg_ent_shift = 3'(code.ent_shift[k]); cfg_ent_row_last = code.row_last[k];
      cfg_col_we = 1; cfg_col_addr = 5'(k); cfg_col_k = 5'(code.col_list[k]);
      cfg_col_last = code.col_last[k];
      @(negedge clk);
    end
    cfg_ent_we = 0; cfg_col_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(phases == 2 * ITERS + 1, $sformatf("%0d phases", phases));
    foreach (ph_mode[p]) check(ph_mode[p] == ((p % 2 == 0) ? MODE_VN : MODE_CN), "phase order");
    check(zero_phases == code.e, "CN messages zeroed only in the first VN phase");
    check(exp_k.size() == 0 && exp_wk.size() == 0, "all reads issued and written back");
    check(dec_writes == (ITERS + 1) * NB, $sformatf("%0d decision writes", dec_writes));
    check(cycles <= (2 * ITERS + 1) * (code.e + 8) && cycles >= (2 * ITERS + 1) * code.e,
          $sformatf("decode took %0d cycles", cycles));
    @(negedge clk);
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
