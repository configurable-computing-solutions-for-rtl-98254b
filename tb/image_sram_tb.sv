// image_sram_tb: writes random pixels to random addresses of a small image
// store, mirrors them in an array and reads back random addresses, checking
// the one-clock read latency and that rd_data holds when rd_en is low.
module image_sram_tb;
  localparam int unsigned DW = 8, DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  image_sram #(.DW(DW), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= DW'($urandom);
      @(posedge clk); #1 model[a] = wr_data;
    end
    wr_en <= 0;
    for (int n = 0; n < 1000; n++) begin
      rd_en <= 1; rd_addr <= AW'($urandom);
      wr_en <= ($urandom_range(0, 1) == 1); wr_addr <= AW'($urandom); wr_data <= DW'($urandom);
      @(posedge clk); #1;
      expv = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      checks++;
      if (rd_data !== expv) begin failures++; $display("addr %0d: %h expected %h", rd_addr, rd_data, expv); end
      rd_en <= 0; wr_en <= 0;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== expv) begin failures++; $display("rd_data did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
