// tb_msg_fifo: random pushes and pops (including simultaneous push and pop
// when full) against a queue model; checks head data, empty, full and count.
module tb_msg_fifo;
  localparam int unsigned DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [7:0] wr_data = 0, rd_data;
  logic [2:0] count;
  msg_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != q.size() ||
          (q.size() > 0 && rd_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d: size %0d count %0d", i, q.size(), count);
      end
      pop  = (q.size() > 0) && ($urandom_range(2) == 0 || i > 2500);
      push = ($urandom_range(1) == 1) && (q.size() < DEPTH || pop) && i < 2500;
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
