// config_loader_tb: programs a configuration memory with random bytes and
// loads bitstreams of LEN bytes from several base addresses. Checks that the
// configuration port delivers exactly the LEN bytes from base onward, in
// order, with cfg_first on the first, done with the last, that a load takes
// LEN+1 clocks from start to done, and that start is ignored while busy.
module config_loader_tb;
  localparam int unsigned LEN = 9, AW = 7, DEPTH = 128;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [AW-1:0] base = '0;
  logic mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  logic [7:0] mem_rd_data;
  logic cfg_valid, cfg_first;
  logic [7:0] cfg_byte;
  logic prog_en = 0;
  logic [AW-1:0] prog_addr = '0;
  logic [7:0] prog_data = '0;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  config_loader #(.LEN(LEN), .AW(AW)) dut (.*);
  config_memory #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .rst_n, .prog_en, .prog_addr, .prog_data,
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, cyc, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = 8'($urandom);
      prog_en <= 1; prog_addr <= AW'(a); prog_data <= model[a];
      @(posedge clk);
    end
    prog_en <= 0;
    for (int n = 0; n < 12; n++) begin
      b = $urandom_range(0, DEPTH - LEN);
      start <= 1; base <= AW'(b);
      @(posedge clk);
      start <= 0;
      got = 0; cyc = 1;
      while (1) begin
        // a second start while busy must be ignored
        if (cyc == 3) begin start <= 1; base <= '0; end else start <= 0;
        @(posedge clk); #1;
        cyc++;
        if (cfg_valid) begin
          checks++;
          if (cfg_byte !== model[b + got]) begin
            failures++;
            $display("byte %0d: %h expected %h", got, cfg_byte, model[b + got]);
          end
          checks++;
          if (cfg_first !== (got == 0)) begin failures++; $display("cfg_first wrong at byte %0d", got); end
          checks++;
          if (done !== (got == LEN - 1)) begin failures++; $display("done wrong at byte %0d", got); end
          got++;
        end
        if (done) break;
        if (cyc > 4 * LEN) break;
      end
      start <= 0;
      checks++;
      if (got != LEN) begin failures++; $display("got %0d bytes, expected %0d", got, LEN); end
      checks++;
      if (cyc != LEN + 1) begin failures++; $display("load took %0d clocks, expected %0d", cyc, LEN + 1); end
      @(posedge clk); #1;
      checks++;
      if (busy || cfg_valid) begin failures++; $display("loader did not stop"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
