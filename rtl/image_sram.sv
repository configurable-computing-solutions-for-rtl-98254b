// image_sram: the chip store of the board, one 8-bit pixel per word.
//
// The host writes the chip through the write port; the controller reads it
// out in raster order, once per pass. Word address = y*W + x. Reads are
// synchronous: rd_data holds mem[rd_addr] from the clock after rd_en=1 until
// the next read. No reset of the array; rd_data resets to 0.
module image_sram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 128 * 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data <= '0;
    else if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
