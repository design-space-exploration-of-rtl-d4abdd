// tb_cyclic_shifter: every shift amount for two lane counts (a power of two
// and 360, the DVB-S2 circulant size) with random data; checks
// out[d] = in[(d + shift) mod LANES] and that the inverse shift restores the
// input.
module tb_cyclic_shifter;
  int checks = 0, failures = 0;
  logic [7:0][3:0]   a_in, a_out, a_back;
  logic [2:0]        a_sh, a_ish;
  logic [359:0][7:0] b_in, b_out, b_back;
  logic [8:0]        b_sh, b_ish;
  cyclic_shifter #(.LANES(8), .WIDTH(4))   u_a  (.in(a_in), .shift(a_sh), .out(a_out));
  cyclic_shifter #(.LANES(8), .WIDTH(4))   u_ai (.in(a_out), .shift(a_ish), .out(a_back));
  cyclic_shifter #(.LANES(360), .WIDTH(8)) u_b  (.in(b_in), .shift(b_sh), .out(b_out));
  cyclic_shifter #(.LANES(360), .WIDTH(8)) u_bi (.in(b_out), .shift(b_ish), .out(b_back));
  initial begin
    for (int s = 0; s < 8; s++) begin
      a_in = {$urandom}; a_sh = 3'(s); a_ish = 3'((8 - s) % 8);
      #1;
      for (int d = 0; d < 8; d++) begin
        checks++;
        if (a_out[d] != a_in[(d + s) % 8]) failures++;
      end
      checks++;
      if (a_back != a_in) failures++;
    end
    for (int s = 0; s < 360; s++) begin
      for (int d = 0; d < 360; d++) b_in[d] = 8'($urandom);
      b_sh = 9'(s); b_ish = 9'((360 - s) % 360);
      #1;
      for (int d = 0; d < 360; d++) begin
        checks++;
        if (b_out[d] != b_in[(d + s) % 360]) begin
          failures++;
          if (failures < 10) $display("FAIL shift %0d lane %0d", s, d);
        end
      end
      checks++;
      if (b_back != b_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
