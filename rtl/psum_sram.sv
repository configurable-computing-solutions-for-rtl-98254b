// psum_sram: the wide intermediate-result memory next to the compute FPGA.
//
// Each word holds the shapesum partial sums of one window position for all
// templates of a configuration, NP fields of SW bits. A bit-plane pass reads
// a word, adds the new plane's weighted correlation and writes it back; the
// correlation pass reads the finished shapesums. One synchronous read port
// and one write port, usable in the same cycle (at different addresses:
// a read of the address being written returns the old word).
// Word address = y*W + x of the window's bottom-right pixel.
module psum_sram #(
  parameter int unsigned DW    = 56,        // 4 templates x 14 bits
  parameter int unsigned DEPTH = 128 * 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
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
