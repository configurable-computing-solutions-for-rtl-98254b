// atr_board: configurable-computing board for SAR target-template matching.
//
// One chip (W x H pixels of PW bits) is correlated against NG groups of NP
// binary template pairs. The board follows the document's demonstration
// system: a compute ("dynamic") FPGA that is reconfigured for every step, a
// control ("static") FPGA that sequences the work and detects the peak, a
// configuration memory holding the bitstreams, a FIFO for the pixels that
// wrap around to the next template row, an SRAM holding the chip and a wide
// SRAM holding the shapesum partial sums. In this RTL the static FPGA is the
// controller, the configuration loader and the peak detector side by side.
//
// Use: write the chip into the image SRAM (img_wr_*, address y*W+x) and the
// NG*(SH_CFGS+1) bitstreams into the configuration memory (cfg_prog_*,
// bitstream i at address i*CFG_LEN, layout in atr_pkg), then pulse start.
// Per group the board loads a shapesum bitstream and makes PW bit-plane
// passes over the chip (SH_CFGS times, default once), then loads the
// correlate bitstream and makes one correlation pass whose
// results appear on res_* (one window position per clock, offset of the
// template's top-left corner). done pulses when all groups are finished;
// best_* then give the highest bright-minus-surround score, the template
// number (group*NP + lane) and its offset. Each pass takes W*H+1+DRAIN
// clocks and each reconfiguration CFG_LEN+2 clocks, plus one clock per chip.
//
// Beside the board sits the shared-term adder example (shared_term_tree):
// st_term in, st_tpl out, combinational, not connected to the board.
module atr_board
  import atr_pkg::*;
#(
  parameter int unsigned W         = CHIP_W,
  parameter int unsigned H         = CHIP_H,
  parameter int unsigned K         = TPL_K,
  parameter int unsigned PW        = PIX_BITS,
  parameter int unsigned NP        = N_PAIRS,
  parameter int unsigned NTH       = N_THRESH,
  parameter int unsigned NG        = N_GROUPS,
  parameter int unsigned CFG_DEPTH = 1024,
  parameter int unsigned SH_CFGS   = 1,     // shapesum configurations per group
  // derived
  parameter int unsigned N   = K * K,
  parameter int unsigned CW  = $clog2(N + 1),
  parameter int unsigned SW  = $clog2(N * ((1 << PW) - 1) + 1),
  parameter int unsigned AW  = $clog2(W * H),
  parameter int unsigned XW  = $clog2(W),
  parameter int unsigned YW  = $clog2(H),
  parameter int unsigned CAW = $clog2(CFG_DEPTH),
  parameter int unsigned GW  = (NG > 1) ? $clog2(NG) : 1,
  parameter int unsigned TW  = (NTH > 1) ? $clog2(NTH) : 1,
  parameter int unsigned TIW = GW + ((NP > 1) ? $clog2(NP) : 1),
  parameter int unsigned VW  = (PW > NTH) ? PW : NTH
) (
  input  logic               clk,
  input  logic               rst_n,
  // host: chip load
  input  logic               img_wr_en,
  input  logic [AW-1:0]      img_wr_addr,
  input  logic [PW-1:0]      img_wr_data,
  // host: configuration memory programming
  input  logic               cfg_prog_en,
  input  logic [CAW-1:0]     cfg_prog_addr,
  input  logic [7:0]         cfg_prog_data,
  // run control
  input  logic               start,
  output logic               busy,
  output logic               done,
  // correlation result stream (selected pair per template)
  output logic               res_valid,
  output logic [GW-1:0]      res_group,
  output logic [XW-1:0]      res_x,
  output logic [YW-1:0]      res_y,
  output logic [CW-1:0]      res_b   [NP],
  output logic [CW-1:0]      res_s   [NP],
  output logic [TW-1:0]      res_sel [NP],
  // peak
  output logic               best_valid,
  output logic signed [CW:0] best_score,
  output logic [TIW-1:0]     best_tpl,
  output logic [XW-1:0]      best_x,
  output logic [YW-1:0]      best_y,
  // status
  output logic               cfg_loading,    // a bitstream is being loaded
  output logic               dyn_cfg_ready,  // compute FPGA fully configured
  output cfg_mode_e          dyn_mode,       // mode of the loaded bitstream
  output logic               peak_update,    // the peak moved this clock
  // shared-term adder example, side by side with the board
  input  logic [CW-1:0]      st_term [1:10], // term counts 1..10
  output logic [CW+2:0]      st_tpl  [5]     // correlations of templates A..E
);

  localparam int unsigned CFG_LEN = cfg_len(NP, K);
  localparam int unsigned BW      = (PW > 1) ? $clog2(PW) : 1;

  // ---------------- static FPGA: controller ----------------
  logic           ld_start, ld_done;
  logic [CAW-1:0] ld_base;
  logic           img_rd_en;
  logic [AW-1:0]  img_rd_addr;
  logic           frame_start, first_pass, pix_valid;
  logic [BW-1:0]  plane;
  logic           pk_clear;
  logic [GW-1:0]  group;

  atr_controller #(
    .W(W), .H(H), .PW(PW), .NG(NG), .CFG_LEN(CFG_LEN), .CAW(CAW),
    .SH_CFGS(SH_CFGS)
  ) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .ld_start, .ld_base, .ld_done,
    .img_rd_en, .img_rd_addr,
    .frame_start, .plane, .first_pass, .pix_valid,
    .pk_clear, .group
  );

  // ---------------- configuration memory and loader ----------------
  logic           cm_rd_en;
  logic [CAW-1:0] cm_rd_addr;
  logic [7:0]     cm_rd_data;
  logic           cfg_valid, cfg_first;
  logic [7:0]     cfg_byte;

  config_memory #(.DEPTH(CFG_DEPTH), .AW(CAW)) u_cfgmem (
    .clk, .rst_n,
    .prog_en(cfg_prog_en), .prog_addr(cfg_prog_addr), .prog_data(cfg_prog_data),
    .rd_en(cm_rd_en), .rd_addr(cm_rd_addr), .rd_data(cm_rd_data)
  );

  config_loader #(.LEN(CFG_LEN), .AW(CAW)) u_loader (
    .clk, .rst_n,
    .start(ld_start), .base(ld_base), .busy(cfg_loading), .done(ld_done),
    .mem_rd_en(cm_rd_en), .mem_rd_addr(cm_rd_addr), .mem_rd_data(cm_rd_data),
    .cfg_valid, .cfg_first, .cfg_byte
  );

  // ---------------- image SRAM ----------------
  logic [PW-1:0] pix;

  image_sram #(.DW(PW), .DEPTH(W * H), .AW(AW)) u_img (
    .clk, .rst_n,
    .wr_en(img_wr_en), .wr_addr(img_wr_addr), .wr_data(img_wr_data),
    .rd_en(img_rd_en), .rd_addr(img_rd_addr), .rd_data(pix)
  );

  // ---------------- wraparound FIFO ----------------
  logic                fifo_en;
  logic [(K-1)*VW-1:0] fifo_din, fifo_dout;

  wrap_fifo #(.WIDTH((K - 1) * VW), .DEPTH(W - K - 1)) u_fifo (
    .clk, .rst_n, .en(fifo_en), .din(fifo_din), .dout(fifo_dout)
  );

  // ---------------- partial-sum SRAM ----------------
  logic             ps_rd_en, ps_wr_en;
  logic [AW-1:0]    ps_rd_addr, ps_wr_addr;
  logic [NP*SW-1:0] ps_rd_data, ps_wr_data;

  psum_sram #(.DW(NP * SW), .DEPTH(W * H), .AW(AW)) u_psum (
    .clk, .rst_n,
    .rd_en(ps_rd_en), .rd_addr(ps_rd_addr), .rd_data(ps_rd_data),
    .wr_en(ps_wr_en), .wr_addr(ps_wr_addr), .wr_data(ps_wr_data)
  );

  // ---------------- dynamic FPGA ----------------
  dynamic_fpga #(
    .W(W), .H(H), .K(K), .PW(PW), .NP(NP), .NTH(NTH)
  ) u_dyn (
    .clk, .rst_n,
    .cfg_valid, .cfg_first, .cfg_byte, .cfg_ready(dyn_cfg_ready), .mode(dyn_mode),
    .frame_start, .plane, .first_pass,
    .pix_valid, .pix,
    .fifo_en, .fifo_din, .fifo_dout,
    .ps_rd_en, .ps_rd_addr, .ps_rd_data,
    .ps_wr_en, .ps_wr_addr, .ps_wr_data,
    .res_valid, .res_x, .res_y, .res_b, .res_s, .res_sel
  );

  assign res_group = group;

  // ---------------- static FPGA: peak detection ----------------
  peak_detector #(
    .NP(NP), .CW(CW), .XW(XW), .YW(YW), .GW(GW), .TIW(TIW)
  ) u_peak (
    .clk, .rst_n,
    .clear(pk_clear), .in_valid(res_valid), .group,
    .x(res_x), .y(res_y), .b(res_b), .s(res_s),
    .best_valid, .best_score, .best_tpl, .best_x, .best_y,
    .improved(peak_update)
  );

  // Hard-wired shared-term trees for the five-template grouping example.
  // They are not on the board's datapath, which loads templates as masks.
  shared_term_tree #(.TCW(CW)) u_shared_terms (
    .term (st_term),
    .tpl  (st_tpl)
  );

endmodule
