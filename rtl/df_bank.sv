// df_bank: one memory bank of the dataflow decoder. Each functional unit owns
// one bank so that all units read and write one message per cycle without
// conflicts. Simple dual-port RAM: one synchronous read port (data appears on
// rd_data the cycle after rd_en) and one write port. A read and a write to the
// same address in the same cycle return the old contents. Contents are not
// reset; the decoder never reads a word before writing it.
module df_bank #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 630
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
