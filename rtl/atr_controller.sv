// atr_controller: flow of control of the ATR board (the static FPGA's job).
//
// For one chip it runs, for every group g of NP template pairs, with
// S = SH_CFGS shapesum configurations per group:
//   1. for s = 0..S-1: load shapesum bitstream g*(S+1)+s into the compute
//      FPGA and stream the chip from the image SRAM PW times, once per bit
//      plane b = 0..PW-1 (pass 0 overwrites the partial sums, later passes
//      add),
//   2. load the correlate bitstream g*(S+1)+S,
//   3. stream the chip once more; results go to the peak detector.
// Bitstream i starts at configuration address i*CFG_LEN. The peak detector
// is cleared at the start of the chip, so the final peak covers all groups.
// With S = 1 (default) this is the demonstration board's order, four
// template pairs per configuration. With S = 2 it is the flow in which two
// shapesum operations, each preparing two shapesums (the other lanes held
// through the bitstream header), feed one correlation of four pairs.
//
// A pass is one frame_start cycle, W*H read cycles of the image SRAM (one
// pixel per clock; pix_valid follows img_rd_en by one clock, matching the
// synchronous SRAM) and DRAIN idle cycles that let the compute pipeline
// empty before the plane or the configuration changes. done pulses once at
// the end; start is ignored while busy.
module atr_controller
  import atr_pkg::*;
#(
  parameter int unsigned W       = CHIP_W,
  parameter int unsigned H       = CHIP_H,
  parameter int unsigned PW      = PIX_BITS,
  parameter int unsigned NG      = N_GROUPS,
  parameter int unsigned CFG_LEN = cfg_len(N_PAIRS, TPL_K),
  parameter int unsigned CAW     = 10,
  parameter int unsigned DRAIN   = 5,
  parameter int unsigned SH_CFGS = 1,
  parameter int unsigned AW      = $clog2(W * H),
  parameter int unsigned BW      = (PW > 1) ? $clog2(PW) : 1,
  parameter int unsigned GW      = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // configuration loader
  output logic           ld_start,
  output logic [CAW-1:0] ld_base,
  input  logic           ld_done,
  // image SRAM read port
  output logic           img_rd_en,
  output logic [AW-1:0]  img_rd_addr,
  // compute FPGA pass control
  output logic           frame_start,
  output logic [BW-1:0]  plane,
  output logic           first_pass,
  output logic           pix_valid,
  // peak detector
  output logic           pk_clear,
  output logic [GW-1:0]  group
);

  typedef enum logic [2:0] {
    S_IDLE, S_CFG, S_CFG_WAIT, S_FRAME, S_STREAM, S_DRAIN, S_DONE
  } state_e;

  state_e          state;
  cfg_mode_e       phase;
  logic [AW-1:0]   addr;
  logic [$clog2(SH_CFGS+1)-1:0] shc;   // shapesum configuration within the group
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= MODE_SHAPESUM;
      group     <= '0;
      plane     <= '0;
      shc       <= '0;
      addr      <= '0;
      drain_cnt <= '0;
      pix_valid <= 1'b0;
    end else begin
      pix_valid <= img_rd_en;
      unique case (state)
        S_IDLE: if (start) begin
          group <= '0;
          phase <= MODE_SHAPESUM;
          plane <= '0;
          shc   <= '0;
          state <= S_CFG;
        end
        S_CFG:      state <= S_CFG_WAIT;
        S_CFG_WAIT: if (ld_done) state <= S_FRAME;
        S_FRAME: begin
          addr  <= '0;
          state <= S_STREAM;
        end
        S_STREAM: begin
          addr <= addr + 1'b1;
          if (addr == AW'(W * H - 1)) begin
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == $bits(drain_cnt)'(DRAIN - 1)) begin
            if (phase == MODE_SHAPESUM && plane != BW'(PW - 1)) begin
              plane <= plane + 1'b1;
              state <= S_FRAME;
            end else if (phase == MODE_SHAPESUM && shc != $bits(shc)'(SH_CFGS - 1)) begin
              shc   <= shc + 1'b1;
              plane <= '0;
              state <= S_CFG;
            end else if (phase == MODE_SHAPESUM) begin
              phase <= MODE_CORRELATE;
              state <= S_CFG;
            end else if (group != GW'(NG - 1)) begin
              group <= group + 1'b1;
              phase <= MODE_SHAPESUM;
              plane <= '0;
              shc   <= '0;
              state <= S_CFG;
            end else begin
              state <= S_DONE;
            end
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    done        = (state == S_DONE);
    ld_start    = (state == S_CFG);
    ld_base     = CAW'((int'(group) * (SH_CFGS + 1) +
                       ((phase == MODE_CORRELATE) ? SH_CFGS : int'(shc))) * CFG_LEN);
    img_rd_en   = (state == S_STREAM);
    img_rd_addr = addr;
    frame_start = (state == S_FRAME);
    first_pass  = (plane == '0);
    pk_clear    = (state == S_IDLE) && start;
  end

endmodule
