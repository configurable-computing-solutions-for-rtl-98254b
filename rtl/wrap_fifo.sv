// wrap_fifo: RAM-based delay line for the "wraparound" pixels of the 2-D
// correlation window.
//
// A pixel that leaves the last column of template row r must wait until the
// raster scan reaches the same columns one chip row later before it re-enters
// the window on row r+1. Holding those pixels in flip-flops would cost
// (K-1)*(W-K) registers, so, as the document proposes, they are kept in a RAM
// used as a shift register: one address counter steps all rows at once (the
// single control circuit), every row is one slice of the RAM word, and a
// register at the RAM output buffers the data.
//
// Interface: on every clock with en=1 the word din is written and the word
// written DEPTH steps earlier is loaded into dout. Counting the output
// register, a value re-appears DEPTH+1 steps after it went in. dout is 0
// after reset; words that were never written read as whatever the RAM held.
module wrap_fifo #(
  parameter int unsigned WIDTH = 56,   // (K-1) rows x 8-bit pixels
  parameter int unsigned DEPTH = 119   // W-K-1 RAM words for W=128, K=8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  // Address counter shared by all rows.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr <= '0;
    else if (en && ptr == AW'(DEPTH - 1)) ptr <= '0;
    else if (en)                      ptr <= ptr + 1'b1;
  end

  // Read-before-write at the same address gives a DEPTH-step delay.
  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= mem[ptr];
  end

endmodule
