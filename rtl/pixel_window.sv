// pixel_window: K x K flip-flop window over a raster-ordered pixel stream.
//
// Chip pixels arrive one per step (en=1) in raster order and are shifted one
// register to the right per step, as in the document's adder-tree picture:
// the template is fixed and the image is clocked past it. Row 0 takes the new
// pixel; the pixel leaving the last column of row r is handed to the external
// wraparound FIFO (fifo_din slice r) and comes back on fifo_dout slice r to
// enter row r+1 exactly one chip row (W steps) after it entered row r. That
// needs a FIFO of W-K-1 RAM words plus its output register (see wrap_fifo).
//
// After the pixel at (y, x) has been shifted in, win[r][c] holds the pixel at
// (y-r, x-c). A template placed with its top-left corner at
// (y-K+1, x-K+1) therefore sees its pixel (ty, tx) at win[K-1-ty][K-1-tx].
// All K*K pixels are registers so that any template pixel can be wired to an
// adder tree. Reset clears the window.
module pixel_window #(
  parameter int unsigned K  = 8,   // template size
  parameter int unsigned PW = 8    // bits per stored pixel
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [PW-1:0]     pix_in,
  output logic [(K-1)*PW-1:0] fifo_din,   // to wrap_fifo, row r in slice r
  input  logic [(K-1)*PW-1:0] fifo_dout,  // from wrap_fifo
  output logic [PW-1:0]     win [K][K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          win[r][c] <= '0;
    end else if (en) begin
      for (int r = 0; r < K; r++) begin
        if (r == 0) win[r][0] <= pix_in;
        else        win[r][0] <= fifo_dout[(r-1)*PW +: PW];
        for (int c = 1; c < K; c++)
          win[r][c] <= win[r][c-1];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < K - 1; r++)
      fifo_din[r*PW +: PW] = win[r][K-1];
  end

endmodule
