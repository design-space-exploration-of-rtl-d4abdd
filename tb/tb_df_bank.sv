// tb_df_bank: writes random words to random addresses and reads them back
// against an array model, including reads of an address written in the same
// cycle (old data returned) and the one-cycle read latency.
module tb_df_bank;
  localparam int unsigned DEPTH = 37;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  logic [7:0] rd_data, wr_data = 0;
  df_bank #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  logic [7:0] model[DEPTH];
  logic [7:0] expd;
  bit         pend;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 6'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    pend = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data != expd) begin failures++; if (failures < 10) $display("FAIL %0d", i); end
      end
      rd_en = $urandom_range(1); rd_addr = 6'($urandom_range(DEPTH - 1));
      wr_en = $urandom_range(1); wr_addr = ($urandom_range(3) == 0) ? rd_addr : 6'($urandom_range(DEPTH - 1));
      wr_data = 8'($urandom);
      pend = rd_en;
      expd = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
