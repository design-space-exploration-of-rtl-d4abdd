// tb_df_decoder: self-checking testbench of the dataflow min-sum decoder at a
// reduced size (8 lanes, 8 x 4 base matrix). It builds a random quasi-cyclic
// code with a dual-diagonal parity part, encodes random frames, adds channel
// errors, streams several frames back to back with random gaps and random
// output back-pressure, and compares every decoded bit with an independent
// model of the same fixed-point min-sum schedule (qc_code_pkg). It also
// checks that mildly corrupted frames decode to the transmitted codeword and
// bounds the decoding time of each frame.
module tb_df_decoder;
  import qc_code_pkg::*;

  localparam int unsigned LANES = 8;
  localparam int unsigned NB    = 8;
  localparam int unsigned MB    = 4;
  localparam int unsigned EB    = 32;
  localparam int unsigned ITERS = 5;
  localparam int unsigned NF    = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        cfg_ent_we = 0, cfg_ent_row_last, cfg_col_we = 0, cfg_col_last;
  logic [$clog2(EB)-1:0]       cfg_ent_addr, cfg_col_addr, cfg_col_k;
  logic [$clog2(NB)-1:0]       cfg_ent_col;
  logic [$clog2(LANES)-1:0]    cfg_ent_shift;
  logic [$clog2(EB+1)-1:0]     num_edges;
  logic [$clog2(NB+1)-1:0]     num_cols = NB;
  logic [5:0]                  num_iter = ITERS;
  logic                        in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic [LANES-1:0][7:0]       in_data;
  logic [LANES-1:0]            out_data;
  logic                        core_busy, core_done, phase_start;
  ldpc_pkg::fu_mode_e          phase_mode;
  logic [5:0]                  iter;
  logic [1:0]                  llr_full, dec_full;

  df_decoder #(.LANES(LANES), .NB(NB), .EB(EB)) dut (.*);

  int checks = 0, failures = 0;
  qc_code code;
  bit cw   [NF][];
  int llr  [NF][];
  bit ref_d[NF][];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoding-time measurement
  int busy_cycles = 0, frames_timed = 0, in_while_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (core_busy) busy_cycles++;
    if (core_done) begin
      int lo, hi;
      lo = (2 * ITERS + 1) * code.e;
      hi = (2 * ITERS + 1) * (code.e + 2 * 8 + 6) + 4;
      check(busy_cycles >= lo && busy_cycles <= hi,
            $sformatf("decode time %0d outside [%0d,%0d]", busy_cycles, lo, hi));
      busy_cycles = 0;
      frames_timed++;
    end
    if (in_valid && in_ready && core_busy) in_while_busy++;
  end

  initial begin
    int good, err_pos;
    code = new(LANES, MB, NB);
    code.build();
    num_edges = code.e;
    for (int f = 0; f < NF; f++) begin
      code.encode(cw[f]);
      check(code.check(cw[f]), "encoder produced a codeword");
      llr[f] = new[NB * LANES];
      err_pos = $urandom_range((NB - MB) * LANES - 1);
      foreach (llr[f][i]) begin
        int mag;
        bit b;
        mag = $urandom_range(20, 6);
        b   = cw[f][i];
        if (i == err_pos) begin                       // one weak channel error
          b   = !b;
          mag = 3;
        end
        if (f == NF - 1 && i < 3) begin               // exercise -128 saturation
          llr[f][i] = cw[f][i] ? -128 : 127;
        end else begin
          llr[f][i] = b ? -mag : mag;
        end
      end
      code.decode(llr[f], ITERS, ref_d[f]);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < code.e; k++) begin
      cfg_ent_we <= 1; cfg_ent_addr <= k; cfg_ent_col <= code.ent_col[k];
      cfg_ent_shift <= code.ent_shift[k]; cfg_ent_row_last <= code.row_last[k];
      cfg_col_we <= 1; cfg_col_addr <= k; cfg_col_k <= code.col_list[k];
      cfg_col_last <= code.col_last[k];
      @(posedge clk);
    end
    cfg_ent_we <= 0; cfg_col_we <= 0;

    fork
      begin : producer
        bit rdy;
        @(negedge clk);
        for (int f = 0; f < NF; f++) begin
          for (int j = 0; j < NB; j++) begin
            in_valid = 0;
            while ($urandom_range(3) == 0) @(negedge clk);
            in_valid = 1;
            for (int d = 0; d < LANES; d++) in_data[d] = 8'(llr[f][j * LANES + d]);
            do begin
              rdy = in_ready;
              @(negedge clk);
            end while (!rdy);
          end
        end
        in_valid = 0;
      end
      begin : consumer
        bit got;
        logic [LANES-1:0] data;
        logic             lst;
        @(negedge clk);
        for (int f = 0; f < NF; f++) begin
          good = 1;
          for (int j = 0; j < NB; j++) begin
            do begin
              out_ready = ($urandom_range(2) != 0);
              got  = out_valid && out_ready;
              data = out_data;
              lst  = out_last;
              @(negedge clk);
            end while (!got);
            for (int d = 0; d < LANES; d++) begin
              check(data[d] == ref_d[f][j * LANES + d],
                    $sformatf("frame %0d bit %0d: got %0d ref %0d", f, j * LANES + d,
                              data[d], ref_d[f][j * LANES + d]));
              if (data[d] != cw[f][j * LANES + d]) good = 0;
            end
            check(lst == (j == NB - 1), "out_last position");
          end
          check(good == 1, $sformatf("frame %0d not corrected", f));
        end
        out_ready = 0;
      end
    join

    check(frames_timed == NF, "every frame decoded once");
    check(in_while_busy > 0, "input accepted while decoding (double buffering)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
