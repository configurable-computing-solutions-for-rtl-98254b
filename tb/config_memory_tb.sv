// config_memory_tb: programs random bitstream bytes, then reads every
// address back (one-clock latency) and checks rd_data holds with rd_en low.
module config_memory_tb;
  localparam int unsigned DEPTH = 128, AW = 7;
  logic clk = 0, rst_n = 0;
  logic prog_en = 0, rd_en = 0;
  logic [AW-1:0] prog_addr = '0, rd_addr = '0;
  logic [7:0] prog_data = '0, rd_data;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  config_memory #(.DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (rd_data !== 8'h00) begin failures++; $display("rd_data not reset"); end
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 8'($urandom);
      prog_en <= 1; prog_addr <= AW'(a); prog_data <= model[a];
      @(posedge clk);
    end
    prog_en <= 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      rd_en <= 1; rd_addr <= AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("addr %0d: %h expected %h", a, rd_data, model[a]); end
      rd_en <= 0;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("rd_data did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
