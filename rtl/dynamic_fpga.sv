// dynamic_fpga: the reconfigured compute FPGA of the ATR board.
//
// One configuration holds NP template pairs (bright and surround masks) and a
// mode, loaded byte by byte from the configuration memory (layout in
// atr_pkg::cfg_len). Chip pixels stream in raster order, one per clock, into
// a K x K register window whose rows are chained through the external
// wraparound FIFO. For every position where the template lies wholly inside
// the chip the block works in one of two modes:
//
//  * MODE_SHAPESUM, one pass per bit plane b (D = PW passes): the bright
//    templates are correlated with bit plane b of the window and the count,
//    weighted by 2^b, is added to the partial sum read from the partial-sum
//    SRAM and written back (pass 0 writes instead of adding). After D passes
//    the SRAM holds, per position and template, the shapesum: the sum of the
//    8-bit pixels under the bright template. This is the document's serial
//    "method B": one correlator per template and a wide result memory instead
//    of eight parallel bit-plane correlators.
//  * MODE_CORRELATE, one pass: each pixel is cut by the eight fixed thresholds
//    into eight binary images held in the same window, every binary image is
//    correlated with every bright and surround template, the finished
//    shapesum of the position is read back and selects (threshold_select) the
//    pair that is output. One result per clock.
//
// A shapesum bitstream may hold lanes (header bit 1+t): a held lane keeps
// its partial sums, so two shapesum configurations of two templates each
// can prepare the four shapesums one correlate configuration needs.
//
// The correlators are computed for all eight window planes; in shapesum mode
// the bright result of plane b is used. Switching mode or templates means
// loading a new bitstream, which models the document's reconfiguration of
// the FPGA; the gate-level specialisation of the adder trees to one template
// set is left to synthesis with constant masks.
//
// Timing: a pixel accepted in cycle t (pix_valid) is in the window in t+1,
// where the partial-sum read is issued; in t+2 the read word is used and the
// shapesum written back; the correlate result is valid in t+3 (res_valid).
// frame_start (one cycle, before a pass) clears the raster position and
// latches plane and first_pass for that pass. Results carry the offset
// (res_x, res_y) of the template's top-left corner in the chip.
module dynamic_fpga
  import atr_pkg::*;
#(
  parameter int unsigned W   = CHIP_W,
  parameter int unsigned H   = CHIP_H,
  parameter int unsigned K   = TPL_K,
  parameter int unsigned PW  = PIX_BITS,
  parameter int unsigned NP  = N_PAIRS,
  parameter int unsigned NTH = N_THRESH,
  // derived
  parameter int unsigned N   = K * K,
  parameter int unsigned CW  = $clog2(N + 1),
  parameter int unsigned SW  = $clog2(N * ((1 << PW) - 1) + 1),
  parameter int unsigned AW  = $clog2(W * H),
  parameter int unsigned XW  = $clog2(W),
  parameter int unsigned YW  = $clog2(H),
  parameter int unsigned BW  = (PW > 1) ? $clog2(PW) : 1,
  parameter int unsigned TW  = (NTH > 1) ? $clog2(NTH) : 1,
  parameter int unsigned VW  = (PW > NTH) ? PW : NTH
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration port
  input  logic                cfg_valid,
  input  logic                cfg_first,
  input  logic [7:0]          cfg_byte,
  output logic                cfg_ready,
  output cfg_mode_e           mode,
  // pass control
  input  logic                frame_start,
  input  logic [BW-1:0]       plane,
  input  logic                first_pass,
  // pixel stream
  input  logic                pix_valid,
  input  logic [PW-1:0]       pix,
  // wraparound FIFO
  output logic                fifo_en,
  output logic [(K-1)*VW-1:0] fifo_din,
  input  logic [(K-1)*VW-1:0] fifo_dout,
  // partial-sum SRAM
  output logic                ps_rd_en,
  output logic [AW-1:0]       ps_rd_addr,
  input  logic [NP*SW-1:0]    ps_rd_data,
  output logic                ps_wr_en,
  output logic [AW-1:0]       ps_wr_addr,
  output logic [NP*SW-1:0]    ps_wr_data,
  // correlation results
  output logic                res_valid,
  output logic [XW-1:0]       res_x,
  output logic [YW-1:0]       res_y,
  output logic [CW-1:0]       res_b   [NP],
  output logic [CW-1:0]       res_s   [NP],
  output logic [TW-1:0]       res_sel [NP]
);

  localparam int unsigned MB      = (N + 7) / 8;       // bytes per mask
  localparam int unsigned CFG_LEN = cfg_len(NP, K);
  localparam int unsigned CCW     = $clog2(CFG_LEN + 1);

  // ------------------------------------------------------------------
  // Configuration registers
  // ------------------------------------------------------------------
  logic [8*CFG_LEN-1:0] cfg_q;
  logic [CCW-1:0]       cfg_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q     <= '0;
      cfg_cnt   <= '0;
      cfg_ready <= 1'b0;
    end else if (cfg_valid) begin
      if (cfg_first) begin
        cfg_q[7:0] <= cfg_byte;
        cfg_cnt    <= CCW'(1);
        cfg_ready  <= (CFG_LEN == 1);
      end else if (cfg_cnt < CCW'(CFG_LEN)) begin
        cfg_q[8*cfg_cnt +: 8] <= cfg_byte;
        cfg_cnt               <= cfg_cnt + 1'b1;
        cfg_ready             <= (cfg_cnt == CCW'(CFG_LEN - 1));
      end
    end
  end

  assign mode = cfg_mode_e'(cfg_q[0]);

  // Lanes whose partial sums a shapesum configuration leaves untouched.
  logic [NP-1:0] lane_hold;
  assign lane_hold = cfg_q[1 +: NP];

  if (NP > 7) begin : g_np_check
    $error("the header byte has room for at most seven lane-hold bits");
  end

  logic [N-1:0] mask_b [NP];
  logic [N-1:0] mask_s [NP];
  logic [CW-1:0] n_on  [NP];

  always_comb begin
    for (int t = 0; t < NP; t++) begin
      mask_b[t] = cfg_q[8 + 8*MB*t        +: N];
      mask_s[t] = cfg_q[8 + 8*MB*(NP + t) +: N];
      n_on[t]   = '0;
      for (int i = 0; i < N; i++)
        n_on[t] = n_on[t] + CW'(mask_b[t][i]);
    end
  end

  // ------------------------------------------------------------------
  // Pass control and raster position of the incoming pixel
  // ------------------------------------------------------------------
  logic [BW-1:0] plane_q;
  logic          first_q;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plane_q <= '0;
      first_q <= 1'b0;
      in_x    <= '0;
      in_y    <= '0;
    end else if (frame_start) begin
      plane_q <= plane;
      first_q <= first_pass;
      in_x    <= '0;
      in_y    <= '0;
    end else if (pix_valid) begin
      if (in_x == XW'(W - 1)) begin
        in_x <= '0;
        in_y <= in_y + 1'b1;
      end else begin
        in_x <= in_x + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // Input stage: bit planes (shapesum) or thresholded images (correlate)
  // ------------------------------------------------------------------
  logic [NTH-1:0] thr_bits;
  logic [VW-1:0]  vec;

  threshold_bank #(.PW(PW), .NTH(NTH)) u_thr (.pix(pix), .bin(thr_bits));

  always_comb begin
    if (mode == MODE_CORRELATE) vec = VW'(thr_bits);
    else                        vec = VW'(pix);
  end

  // ------------------------------------------------------------------
  // Stage 0: window
  // ------------------------------------------------------------------
  logic [VW-1:0] win [K][K];

  pixel_window #(.K(K), .PW(VW)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (pix_valid),
    .pix_in   (vec),
    .fifo_din (fifo_din),
    .fifo_dout(fifo_dout),
    .win      (win)
  );

  assign fifo_en = pix_valid;

  logic          s0_valid;
  logic [XW-1:0] s0_x;
  logic [YW-1:0] s0_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid <= 1'b0;
      s0_x     <= '0;
      s0_y     <= '0;
    end else begin
      s0_valid <= pix_valid && !frame_start &&
                  (in_x >= XW'(K - 1)) && (in_y >= YW'(K - 1));
      s0_x     <= in_x;
      s0_y     <= in_y;
    end
  end

  // Window planes as template-ordered bit vectors: bit ty*K+tx of plane j.
  logic [N-1:0] plane_bits [VW];

  always_comb begin
    for (int j = 0; j < VW; j++)
      for (int ty = 0; ty < K; ty++)
        for (int tx = 0; tx < K; tx++)
          plane_bits[j][ty*K + tx] = win[K-1-ty][K-1-tx][j];
  end

  logic [CW-1:0] corr_b [NP][NTH];
  logic [CW-1:0] corr_s [NP][NTH];

  for (genvar t = 0; t < NP; t++) begin : g_tpl
    for (genvar j = 0; j < NTH; j++) begin : g_plane
      template_correlator #(.N(N), .CW(CW)) u_cb (
        .bits(plane_bits[j]), .mask(mask_b[t]), .sum(corr_b[t][j]));
      template_correlator #(.N(N), .CW(CW)) u_cs (
        .bits(plane_bits[j]), .mask(mask_s[t]), .sum(corr_s[t][j]));
    end
  end

  // Partial-sum read for the window position, issued in stage 0.
  logic [AW-1:0] s0_addr;
  assign s0_addr    = AW'(s0_y) * AW'(W) + AW'(s0_x);
  assign ps_rd_en   = s0_valid;
  assign ps_rd_addr = s0_addr;

  // ------------------------------------------------------------------
  // Stage 1: correlations registered, partial sum arrives
  // ------------------------------------------------------------------
  logic          s1_valid;
  logic [AW-1:0] s1_addr;
  logic [XW-1:0] s1_x;
  logic [YW-1:0] s1_y;
  logic [CW-1:0] s1_b [NP][NTH];
  logic [CW-1:0] s1_s [NP][NTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_addr  <= '0;
      s1_x     <= '0;
      s1_y     <= '0;
      for (int t = 0; t < NP; t++)
        for (int j = 0; j < NTH; j++) begin
          s1_b[t][j] <= '0;
          s1_s[t][j] <= '0;
        end
    end else begin
      s1_valid <= s0_valid;
      s1_addr  <= s0_addr;
      s1_x     <= XW'(s0_x - XW'(K - 1));
      s1_y     <= YW'(s0_y - YW'(K - 1));
      s1_b     <= corr_b;
      s1_s     <= corr_s;
    end
  end

  // Shapesum accumulation (method B): psum += corr(plane b) << b.
  always_comb begin
    ps_wr_en   = s1_valid && (mode == MODE_SHAPESUM);
    ps_wr_addr = s1_addr;
    for (int t = 0; t < NP; t++) begin
      if (lane_hold[t])
        ps_wr_data[t*SW +: SW] = ps_rd_data[t*SW +: SW];
      else
        ps_wr_data[t*SW +: SW] =
          (first_q ? SW'(0) : ps_rd_data[t*SW +: SW]) +
          (SW'(s1_b[t][plane_q]) << plane_q);
    end
  end

  // Threshold selection by the finished shapesum.
  logic [TW-1:0] sel_c [NP];
  logic [CW-1:0] b_c   [NP];
  logic [CW-1:0] s_c   [NP];

  for (genvar t = 0; t < NP; t++) begin : g_sel
    threshold_select #(.NTH(NTH), .SW(SW), .NW(CW), .CW(CW)) u_sel (
      .shapesum(ps_rd_data[t*SW +: SW]),
      .n_on    (n_on[t]),
      .corr_b  (s1_b[t]),
      .corr_s  (s1_s[t]),
      .sel     (sel_c[t]),
      .b_out   (b_c[t]),
      .s_out   (s_c[t])
    );
  end

  // ------------------------------------------------------------------
  // Stage 2: correlate-mode result
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_x     <= '0;
      res_y     <= '0;
      for (int t = 0; t < NP; t++) begin
        res_b[t]   <= '0;
        res_s[t]   <= '0;
        res_sel[t] <= '0;
      end
    end else begin
      res_valid <= s1_valid && (mode == MODE_CORRELATE);
      res_x     <= s1_x;
      res_y     <= s1_y;
      res_b     <= b_c;
      res_s     <= s_c;
      res_sel   <= sel_c;
    end
  end

  // Pixels may only stream into a fully loaded configuration.
  a_cfg_before_pixels: assert property (
    @(posedge clk) disable iff (!rst_n) pix_valid |-> cfg_ready)
    else $error("pixel streamed before the configuration was complete");

endmodule
