// dynamic_fpga_tb: the compute FPGA with its wraparound FIFO and partial-sum
// SRAM on a 12 x 10 chip, 4 x 4 templates, two template pairs. For two
// random template sets it loads the shapesum bitstream, makes eight bit-plane
// passes (random idle clocks between pixels) and checks every partial-sum
// word against the shapesum computed directly from the image; then loads the
// correlate bitstream, makes one pass and checks, for every window position,
// the offset, the chosen threshold and the bright and surround correlations
// against a software model, and that each result appears three clocks after
// the pixel that completed its window.
module dynamic_fpga_tb;
  import atr_pkg::*;
  localparam int unsigned W = 12, H = 10, K = 4, PW = 8, NP = 2, NTH = 8;
  localparam int unsigned N = K * K, CW = 5, SW = 12, AW = 7, XW = 4, YW = 4;
  localparam int unsigned LEN = cfg_len(NP, K);
  localparam int unsigned MB = N / 8;

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, cfg_first = 0, cfg_ready;
  logic [7:0] cfg_byte = '0;
  cfg_mode_e mode;
  logic frame_start = 0, first_pass = 0, pix_valid = 0;
  logic [2:0] plane = '0;
  logic [PW-1:0] pix = '0;
  logic fifo_en;
  logic [(K-1)*PW-1:0] fifo_din, fifo_dout;
  logic ps_rd_en, ps_wr_en;
  logic [AW-1:0] ps_rd_addr, ps_wr_addr;
  logic [NP*SW-1:0] ps_rd_data, ps_wr_data;
  logic res_valid;
  logic [XW-1:0] res_x;
  logic [YW-1:0] res_y;
  logic [CW-1:0] res_b [NP], res_s [NP];
  logic [2:0] res_sel [NP];

  dynamic_fpga #(.W(W), .H(H), .K(K), .PW(PW), .NP(NP), .NTH(NTH)) dut (.*);
  wrap_fifo #(.WIDTH((K-1)*PW), .DEPTH(W-K-1)) u_fifo (
    .clk, .rst_n, .en(fifo_en), .din(fifo_din), .dout(fifo_dout));
  psum_sram #(.DW(NP*SW), .DEPTH(W*H), .AW(AW)) u_psum (
    .clk, .rst_n, .rd_en(ps_rd_en), .rd_addr(ps_rd_addr), .rd_data(ps_rd_data),
    .wr_en(ps_wr_en), .wr_addr(ps_wr_addr), .wr_data(ps_wr_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]   img [H][W];
  logic [N-1:0] mb [NP], ms [NP];
  // Clock edges counted with a nonblocking update so that every process
  // sampling at an edge sees the same count.
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_shapesum(int t, int y0, int x0);
    int acc = 0;
    for (int ty = 0; ty < K; ty++)
      for (int tx = 0; tx < K; tx++)
        if (mb[t][ty*K+tx]) acc += int'(img[y0+ty][x0+tx]);
    return acc;
  endfunction

  function automatic int ref_sel(int t, int y0, int x0);
    int non = 0, ss, sel = 0;
    for (int i = 0; i < N; i++) non += int'(mb[t][i]);
    ss = ref_shapesum(t, y0, x0);
    for (int i = 1; i < NTH; i++)
      if (2 * non * (8 + 16 * i) <= ss) sel = i;
    return sel;
  endfunction

  function automatic int ref_corr(logic [N-1:0] m, int thr, int y0, int x0);
    int acc = 0;
    for (int ty = 0; ty < K; ty++)
      for (int tx = 0; tx < K; tx++)
        if (m[ty*K+tx] && int'(img[y0+ty][x0+tx]) >= thr) acc++;
    return acc;
  endfunction

  task automatic load_cfg(cfg_mode_e m);
    logic [7:0] bytes [LEN];
    bytes[0] = 8'(m);
    for (int t = 0; t < NP; t++)
      for (int j = 0; j < MB; j++) begin
        bytes[1 + t*MB + j]      = mb[t][8*j +: 8];
        bytes[1 + (NP+t)*MB + j] = ms[t][8*j +: 8];
      end
    for (int i = 0; i < LEN; i++) begin
      cfg_valid <= 1; cfg_first <= (i == 0); cfg_byte <= bytes[i];
      @(posedge clk);
      #1;
      checks++;
      if (cfg_ready !== (i == LEN - 1)) begin failures++; $display("cfg_ready wrong after byte %0d", i); end
    end
    cfg_valid <= 0; cfg_first <= 0;
    @(posedge clk);
    checks++;
    if (mode !== m) begin failures++; $display("mode not loaded"); end
  endtask

  // Edge at which each pixel was accepted.
  int pix_cycle [H][W];
  int in_x = 0, in_y = 0;
  always @(posedge clk) begin
    if (frame_start) begin in_x = 0; in_y = 0; end
    else if (pix_valid) begin
      pix_cycle[in_y][in_x] = cyc;
      if (in_x == W - 1) begin in_x = 0; in_y++; end else in_x++;
    end
  end

  task automatic run_pass(int b, bit gaps);
    frame_start <= 1; plane <= 3'(b); first_pass <= (b == 0);
    @(posedge clk);
    frame_start <= 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        while (gaps && $urandom_range(0, 5) == 0) begin pix_valid <= 0; @(posedge clk); end
        pix_valid <= 1; pix <= img[y][x];
        @(posedge clk);
      end
    pix_valid <= 0;
    repeat (5) @(posedge clk);
  endtask

  // result monitor
  int n_res = 0;
  bit mon_on = 0;
  int sel_seen [NTH];
  always @(posedge clk) if (mon_on && res_valid) begin
    int x0, y0, sel;
    x0 = int'(res_x); y0 = int'(res_y);
    n_res++;
    checks++;
    if (cyc - pix_cycle[y0+K-1][x0+K-1] != 3) begin
      failures++; $display("latency %0d", cyc - pix_cycle[y0+K-1][x0+K-1]);
    end
    for (int t = 0; t < NP; t++) begin
      sel = ref_sel(t, y0, x0);
      sel_seen[sel]++;
      checks += 3;
      if (int'(res_sel[t]) != sel) begin failures++; $display("(%0d,%0d) t%0d sel %0d expected %0d", y0, x0, t, res_sel[t], sel); end
      if (int'(res_b[t]) != ref_corr(mb[t], 8 + 16 * sel, y0, x0)) begin
        failures++; $display("(%0d,%0d) t%0d bright %0d expected %0d", y0, x0, t, res_b[t], ref_corr(mb[t], 8 + 16 * sel, y0, x0));
      end
      if (int'(res_s[t]) != ref_corr(ms[t], 8 + 16 * sel, y0, x0)) begin
        failures++; $display("(%0d,%0d) t%0d surround %0d expected %0d", y0, x0, t, res_s[t], ref_corr(ms[t], 8 + 16 * sel, y0, x0));
      end
    end
  end

  initial begin
    int nsel;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (run == 0) ? 8'($urandom) : 8'(y * 25 + $urandom_range(0, 30));
      for (int t = 0; t < NP; t++) begin
        mb[t] = 16'($urandom) & 16'($urandom);
        ms[t] = 16'($urandom) & ~mb[t];
        if (mb[t] == '0) mb[t][5] = 1'b1;
      end
      load_cfg(MODE_SHAPESUM);
      for (int b = 0; b < PW; b++) run_pass(b, run == 0);
      for (int y0 = 0; y0 + K <= H; y0++)
        for (int x0 = 0; x0 + K <= W; x0++)
          for (int t = 0; t < NP; t++) begin
            checks++;
            if (int'(u_psum.mem[(y0+K-1)*W + x0+K-1][t*SW +: SW]) != ref_shapesum(t, y0, x0)) begin
              failures++;
              $display("shapesum (%0d,%0d) t%0d = %0d expected %0d", y0, x0, t,
                       u_psum.mem[(y0+K-1)*W + x0+K-1][t*SW +: SW], ref_shapesum(t, y0, x0));
            end
          end
      load_cfg(MODE_CORRELATE);
      n_res = 0;
      mon_on = 1;
      run_pass(0, run == 1);
      mon_on = 0;
      checks++;
      if (n_res != (W-K+1)*(H-K+1)) begin failures++; $display("%0d results", n_res); end
    end
    nsel = 0;
    for (int i = 0; i < NTH; i++) if (sel_seen[i] > 0) nsel++;
    $display("distinct thresholds selected: %0d", nsel);
    checks++;
    if (nsel < 3) begin failures++; $display("threshold selection hardly exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
