// config_memory: the board's configuration store (an EPROM on the board).
//
// Holds the bitstreams of the compute FPGA back to back, one byte per word.
// The programming port stands for the EPROM programmer (or a host writing a
// RAM in its place); the read port is addressed by the configuration loader.
// Reads are synchronous: rd_data holds mem[rd_addr] from the clock after
// rd_en=1. The document gives no size for this memory; the default holds the
// eight bitstreams (two per group of four template pairs) of one chip with
// room to spare.
module config_memory #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          prog_en,
  input  logic [AW-1:0] prog_addr,
  input  logic [7:0]    prog_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_en) mem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data <= '0;
    else if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
