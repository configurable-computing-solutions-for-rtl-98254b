// pixel_window_tb: streams a random W x H image through the window and its
// wraparound FIFO (W-K-1 words) with random idle clocks, and checks after
// every pixel at (y, x) with x, y >= K-1 that win[r][c] holds pixel
// (y-r, x-c) of the image.
module pixel_window_tb;
  localparam int unsigned W = 11, H = 7, K = 3, PW = 8;

  logic clk = 0, rst_n = 0, en = 0;
  logic [PW-1:0] pix_in = '0;
  logic [(K-1)*PW-1:0] fifo_din, fifo_dout;
  logic [PW-1:0] win [K][K];
  logic [PW-1:0] img [H][W];
  int checks = 0, failures = 0;

  pixel_window #(.K(K), .PW(PW)) dut (.*);
  wrap_fifo #(.WIDTH((K-1)*PW), .DEPTH(W-K-1)) u_fifo (
    .clk, .rst_n, .en, .din(fifo_din), .dout(fifo_dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = PW'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 4) == 0) begin
            en <= 0;
            @(posedge clk);
          end
          en     <= 1;
          pix_in <= img[y][x];
          @(posedge clk);
          en <= 0;
          #1;
          if (x >= K-1 && y >= K-1) begin
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++) begin
                checks++;
                if (win[r][c] !== img[y-r][x-c]) begin
                  failures++;
                  if (failures < 10)
                    $display("(%0d,%0d) win[%0d][%0d]=%h expected %h",
                             y, x, r, c, win[r][c], img[y-r][x-c]);
                end
              end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
