// atr_board_tb: end-to-end test of the ATR board on a reduced
// chip (16 x 12 pixels, 4 x 4 templates, two groups of four template pairs).
//
// A chip is generated with a mid-grey random background, NP*NG random
// binary template pairs (sparse bright masks, disjoint surround masks), and
// one planted target: at a chosen offset the pixels under one bright
// template are made bright and those under its surround template dark. The
// chip and the NG*(SHC+1) bitstreams (SHC shapesum and one correlate per
// group) are written
// through the host ports and the board is started. Every correlation result
// is checked against a software model (shapesum, threshold choice, bright
// and surround counts); after done the peak is checked against the model's
// peak search, and the run time against the cycle formula of the board.
// Each mechanism of the board must occur: reconfiguration, the switch
// between shapesum and correlate modes, overwriting and accumulating
// shapesum passes, lanes held by a shapesum configuration (when SHC > 1), pixels returning through the wraparound FIFO, several
// distinct threshold choices, and peak updates. The side-by-side shared-term
// adder example is driven with random term counts and checked as well.
module atr_board_tb;
  import atr_pkg::*;
  localparam int unsigned W = 16, H = 12, K = 4, PW = 8, NP = 4, NTH = 8, NG = 2;
  localparam int unsigned CFG_DEPTH = 128, SHC = 1;
  localparam int unsigned BRIGHT_ON = 0;  // 0: random density
  localparam int unsigned N   = K * K;
  localparam int unsigned CW  = $clog2(N + 1);
  localparam int unsigned AW  = $clog2(W * H);
  localparam int unsigned XW  = $clog2(W);
  localparam int unsigned YW  = $clog2(H);
  localparam int unsigned CAW = $clog2(CFG_DEPTH);
  localparam int unsigned GW  = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned TW  = $clog2(NTH);
  localparam int unsigned TIW = GW + $clog2(NP);
  localparam int unsigned LEN = cfg_len(NP, K);
  localparam int unsigned MB  = (N + 7) / 8;
  localparam int unsigned DRAIN = 5;
  localparam int unsigned NT  = NP * NG;

  logic clk = 0, rst_n = 0;
  logic img_wr_en = 0;
  logic [AW-1:0] img_wr_addr = '0;
  logic [PW-1:0] img_wr_data = '0;
  logic cfg_prog_en = 0;
  logic [CAW-1:0] cfg_prog_addr = '0;
  logic [7:0] cfg_prog_data = '0;
  logic start = 0, busy, done;
  logic res_valid;
  logic [GW-1:0] res_group;
  logic [XW-1:0] res_x;
  logic [YW-1:0] res_y;
  logic [CW-1:0] res_b [NP], res_s [NP];
  logic [TW-1:0] res_sel [NP];
  logic best_valid;
  logic signed [CW:0] best_score;
  logic [TIW-1:0] best_tpl;
  logic [XW-1:0] best_x;
  logic [YW-1:0] best_y;
  logic cfg_loading, dyn_cfg_ready, peak_update;
  cfg_mode_e dyn_mode;
  logic [CW-1:0] st_term [1:10];
  logic [CW+2:0] st_tpl  [5];

  atr_board #(.W(W), .H(H), .K(K), .PW(PW), .NP(NP), .NTH(NTH), .NG(NG), .CFG_DEPTH(CFG_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]   img [H][W];
  logic [N-1:0] mb [NT], ms [NT];
  int           non [NT];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int thr(int i);
    return 8 + 16 * i;
  endfunction

  function automatic int ref_sel(int t, int y0, int x0);
    int ss = 0, sel = 0;
    for (int ty = 0; ty < K; ty++)
      for (int tx = 0; tx < K; tx++)
        if (mb[t][ty*K+tx]) ss += int'(img[y0+ty][x0+tx]);
    for (int i = 1; i < NTH; i++)
      if (2 * non[t] * thr(i) <= ss) sel = i;
    return sel;
  endfunction

  function automatic int ref_corr(logic [N-1:0] m, int th, int y0, int x0);
    int acc = 0;
    for (int ty = 0; ty < K; ty++)
      for (int tx = 0; tx < K; tx++)
        if (m[ty*K+tx] && int'(img[y0+ty][x0+tx]) >= th) acc++;
    return acc;
  endfunction

  // ---------------- shared-term example ----------------
  // Random term counts for the first 500 clocks; each template output must
  // equal the plain sum of its term list.
  int n_shared = 0;
  initial for (int i = 1; i <= 10; i++) st_term[i] = '0;
  always @(posedge clk) if (n_shared < 500) begin
    automatic int e [5];
    e[0] = st_term[1] + st_term[2] + st_term[5] + st_term[6] + st_term[7] + st_term[9];
    e[1] = st_term[4] + st_term[5] + st_term[6] + st_term[7] + st_term[10];
    e[2] = st_term[1] + st_term[2] + st_term[3] + st_term[5] + st_term[6];
    e[3] = st_term[1] + st_term[5];
    e[4] = st_term[4] + st_term[5] + st_term[6] + st_term[7] + st_term[8];
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (int'(st_tpl[t]) != e[t]) begin
        failures++;
        $display("shared-term template %0d: got %0d expected %0d", t, st_tpl[t], e[t]);
      end
    end
    n_shared <= n_shared + 1;
    for (int i = 1; i <= 10; i++) st_term[i] <= CW'($urandom_range(0, N));
  end

  // ---------------- result monitor ----------------
  int n_res [NG];
  int sel_seen [NTH];
  int n_peak_updates = 0, n_reconfig = 0, n_mode_switch = 0;
  int n_first_pass = 0, n_accum_pass = 0, n_wrapped = 0, n_held = 0;
  bit loading_d = 0;
  cfg_mode_e mode_d = MODE_SHAPESUM;
  bit mode_seen = 0;

  always @(posedge clk) if (rst_n) begin
    loading_d <= cfg_loading;
    if (cfg_loading && !loading_d) n_reconfig++;
    if (dyn_cfg_ready) begin
      if (mode_seen && dyn_mode != mode_d) n_mode_switch++;
      mode_d    <= dyn_mode;
      mode_seen <= 1;
    end
    if (dut.frame_start && dut.dyn_mode == MODE_SHAPESUM) begin
      if (dut.first_pass) n_first_pass++; else n_accum_pass++;
    end
    // a pixel coming back from the FIFO into row 1 of a valid window
    if (dut.u_dyn.s0_valid) n_wrapped++;
    if (peak_update) n_peak_updates++;
    if (dut.u_dyn.ps_wr_en && dut.u_dyn.lane_hold != '0) n_held++;
    if (res_valid) begin
      int x0, y0, g, sel, eb, es;
      x0 = int'(res_x); y0 = int'(res_y); g = int'(res_group);
      n_res[g]++;
      for (int l = 0; l < NP; l++) begin
        int t;
        t = g * NP + l;
        sel = ref_sel(t, y0, x0);
        eb = ref_corr(mb[t], thr(sel), y0, x0);
        es = ref_corr(ms[t], thr(sel), y0, x0);
        sel_seen[sel]++;
        checks++;
        if (int'(res_sel[l]) != sel || int'(res_b[l]) != eb || int'(res_s[l]) != es) begin
          failures++;
          if (failures < 10)
            $display("tpl %0d (%0d,%0d): sel %0d b %0d s %0d, expected %0d %0d %0d",
                     t, y0, x0, res_sel[l], res_b[l], res_s[l], sel, eb, es);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    int pt, py, px, cyc_start, cyc_run, exp_cyc;
    int m_score, m_tpl, m_x, m_y, nsel;
    bit m_valid;
    logic [7:0] bytes [LEN];

    // templates
    for (int t = 0; t < NT; t++) begin
      // bright: about 15% of the pixels, or exactly BRIGHT_ON of them
      mb[t] = '0;
      if (BRIGHT_ON == 0) begin
        for (int i = 0; i < N; i++) mb[t][i] = ($urandom_range(0, 99) < 15);
      end else begin
        for (int n = 0; n < BRIGHT_ON; ) begin
          automatic int i = $urandom_range(0, N - 1);
          if (!mb[t][i]) begin mb[t][i] = 1'b1; n++; end
        end
      end
      for (int i = 0; i < N; i++) ms[t][i] = !mb[t][i] && ($urandom_range(0, 99) < 30);
      if (mb[t] == '0) mb[t][N/2] = 1'b1;
      non[t] = 0;
      for (int i = 0; i < N; i++) non[t] += int'(mb[t][i]);
    end
    // chip with a planted target
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = 8'($urandom_range(40, 150));
    // the planted template is the one with most "on" pixels, so that a full
    // match is the highest score any template can reach
    pt = 0;
    for (int t = 1; t < NT; t++) if (non[t] > non[pt]) pt = t;
    py = H / 3; px = W / 2;
    for (int ty = 0; ty < K; ty++)
      for (int tx = 0; tx < K; tx++) begin
        if (mb[pt][ty*K+tx]) img[py+ty][px+tx] = 8'($urandom_range(230, 255));
        else if (ms[pt][ty*K+tx]) img[py+ty][px+tx] = 8'($urandom_range(0, 10));
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img_wr_en <= 1; img_wr_addr <= AW'(y * W + x); img_wr_data <= img[y][x];
        @(posedge clk);
      end
    img_wr_en <= 0;
    // per group: SHC shapesum bitstreams, configuration s computing the
    // lanes l with l*SHC/NP == s and holding the others, then the correlate
    // bitstream
    for (int bs = 0; bs < NG * (SHC + 1); bs++) begin
      int g, s;
      g = bs / (SHC + 1); s = bs % (SHC + 1);
      if (s == SHC) bytes[0] = 8'(MODE_CORRELATE);
      else begin
        bytes[0] = 8'(MODE_SHAPESUM);
        for (int l = 0; l < NP; l++)
          if (l * SHC / NP != s) bytes[0][1 + l] = 1'b1;
      end
      for (int l = 0; l < NP; l++)
        for (int j = 0; j < MB; j++) begin
          bytes[1 + l*MB + j]      = mb[g*NP + l][8*j +: 8];
          bytes[1 + (NP+l)*MB + j] = ms[g*NP + l][8*j +: 8];
        end
      for (int i = 0; i < LEN; i++) begin
        cfg_prog_en <= 1; cfg_prog_addr <= CAW'(bs * LEN + i); cfg_prog_data <= bytes[i];
        @(posedge clk);
      end
    end
    cfg_prog_en <= 0;
    @(posedge clk);

    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc_start = 0;
    cyc_run = 0;
    while (!done) begin @(posedge clk); cyc_run++; end
    repeat (3) @(posedge clk);

    // run time: per group SHC+1 loads (LEN+2 clocks each) and SHC*PW+1
    // passes (1 + W*H + DRAIN clocks each), then the done state.
    exp_cyc = NG * ((SHC + 1) * (LEN + 2) + (SHC * PW + 1) * (1 + W * H + DRAIN)) + 1;
    $display("run took %0d clocks (formula %0d)", cyc_run, exp_cyc);
    checks++;
    if (cyc_run != exp_cyc) begin failures++; $display("run time differs from the formula"); end

    // results per group: one per window position
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (n_res[g] != (W-K+1) * (H-K+1)) begin failures++; $display("group %0d: %0d results", g, n_res[g]); end
    end

    // reference peak search in the board's order
    m_valid = 0; m_score = 0; m_tpl = 0; m_x = 0; m_y = 0;
    for (int g = 0; g < NG; g++)
      for (int y0 = 0; y0 + K <= H; y0++)
        for (int x0 = 0; x0 + K <= W; x0++)
          for (int l = 0; l < NP; l++) begin
            int t, sel, sc;
            t = g * NP + l;
            sel = ref_sel(t, y0, x0);
            sc = ref_corr(mb[t], thr(sel), y0, x0) - ref_corr(ms[t], thr(sel), y0, x0);
            if (!m_valid || sc > m_score) begin
              m_valid = 1; m_score = sc; m_tpl = t; m_x = x0; m_y = y0;
            end
          end
    $display("peak: template %0d at (x=%0d, y=%0d) score %0d; planted template %0d at (x=%0d, y=%0d)",
             best_tpl, best_x, best_y, best_score, pt, px, py);
    checks++;
    if (!best_valid || int'(best_score) != m_score || int'(best_tpl) != m_tpl ||
        int'(best_x) != m_x || int'(best_y) != m_y) begin
      failures++;
      $display("expected peak template %0d at (%0d,%0d) score %0d", m_tpl, m_x, m_y, m_score);
    end

    checks++;
    if (int'(best_tpl) != pt || int'(best_x) != px || int'(best_y) != py) begin
      failures++; $display("planted target not detected");
    end

    // mechanisms
    nsel = 0;
    for (int i = 0; i < NTH; i++) if (sel_seen[i] > 0) nsel++;
    $display("reconfigurations %0d, mode switches %0d, overwrite passes %0d, accumulate passes %0d, held-lane writes %0d",
             n_reconfig, n_mode_switch, n_first_pass, n_accum_pass, n_held);
    $display("window positions fed through the FIFO %0d, distinct thresholds %0d, peak updates %0d",
             n_wrapped, nsel, n_peak_updates);
    checks += 9;
    if (n_shared < 500) begin failures++; $display("shared-term example not exercised"); end
    if (n_reconfig != NG * (SHC + 1)) begin failures++; $display("reconfiguration count wrong"); end
    if (n_mode_switch != 2 * NG - 1) begin failures++; $display("mode switch count wrong"); end
    if (n_first_pass != NG * SHC) begin failures++; $display("overwrite pass count wrong"); end
    if (n_accum_pass != NG * SHC * (PW - 1)) begin failures++; $display("accumulate pass count wrong"); end
    if ((SHC > 1) != (n_held > 0)) begin failures++; $display("lane hold count wrong"); end
    if (n_wrapped == 0) begin failures++; $display("FIFO never used"); end
    if (nsel < 2) begin failures++; $display("threshold selection not exercised"); end
    if (n_peak_updates == 0) begin failures++; $display("peak never updated"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
