// tb_df_manager: streams five frames through the manager with random input
// gaps and random output back-pressure. The testbench models the banks and a
// decoder core that takes 40 cycles and returns the sign bits of the buffer
// it was given. Output beats must equal the sign bits of the input frames,
// in order, with out_last on the last beat; the test also checks that new
// frames are accepted while the core is decoding (double buffering) and that
// the core is never started on a buffer that is not full.
module tb_df_manager;
  localparam int unsigned LANES = 4, NB = 5, NF = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] num_cols = NB;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic [LANES-1:0][7:0] in_data;
  logic [LANES-1:0] out_data;
  logic llr_we, dec_re, dec_start, dec_done = 0, llr_rbuf, dec_wbuf;
  logic [3:0] llr_waddr, dec_raddr;
  logic [LANES-1:0][7:0] llr_wdata;
  logic [LANES-1:0] dec_rdata;
  logic [1:0] llr_full, dec_full;
  df_manager #(.LANES(LANES), .NB(NB)) dut (.*);

  logic [LANES-1:0][7:0] llr_mem[2 * NB];
  logic [LANES-1:0]      dec_mem[2 * NB];
  always_ff @(posedge clk) begin
    if (llr_we) llr_mem[llr_waddr] <= llr_wdata;
    if (dec_re) dec_rdata <= dec_mem[dec_raddr];
  end

  int checks = 0, failures = 0, overlap = 0, decodes = 0;
  logic [LANES-1:0][7:0] frames[NF][NB];

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

  // decoder core model
  initial begin
    @(posedge rst_n);
    @(negedge clk);
    forever begin
      while (!dec_start) @(negedge clk);
      begin
        check(llr_full[llr_rbuf] && !dec_full[dec_wbuf], "start only with a full input buffer");
        repeat (40) begin
          @(negedge clk);
          if (in_valid && in_ready) overlap++;
        end
        for (int j = 0; j < NB; j++)
          for (int d = 0; d < LANES; d++)
            dec_mem[(dec_wbuf ? NB : 0) + j][d] = llr_mem[(llr_rbuf ? NB : 0) + j][d][7];
        dec_done = 1;
        decodes++;
        @(negedge clk);
        dec_done = 0;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int j = 0; j < NB; j++)
        for (int d = 0; d < LANES; d++) frames[f][j][d] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin
        bit rdy;
        for (int f = 0; f < NF; f++)
          for (int j = 0; j < NB; j++) begin
            in_valid = 0;
            while ($urandom_range(2) == 0) @(negedge clk);
            in_valid = 1; in_data = frames[f][j];
            do begin rdy = in_ready; @(negedge clk); end while (!rdy);
          end
        in_valid = 0;
      end
      begin
        bit got, lst;
        logic [LANES-1:0] data;
        for (int f = 0; f < NF; f++)
          for (int j = 0; j < NB; j++) begin
            do begin
              out_ready = ($urandom_range(1) == 1);
              got = out_valid && out_ready; data = out_data; lst = out_last;
              @(negedge clk);
            end while (!got);
            for (int d = 0; d < LANES; d++)
              check(data[d] == frames[f][j][d][7], $sformatf("frame %0d beat %0d lane %0d", f, j, d));
            check(lst == (j == NB - 1), "out_last");
          end
        out_ready = 0;
      end
    join
    check(decodes == NF, "one decode per frame");
    check(overlap > 0, "input accepted while decoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
