// atr_pkg: sizes, types and constants shared by the ATR correlation board.
//
// The board correlates one 128 x 128 chip of 8-bit SAR pixels against binary
// 8 x 8 target templates, four bright/surround template pairs per
// configuration of the compute FPGA and four configurations per chip (sixteen
// pairs). Those numbers follow the document's demonstration board. The
// threshold levels, the bitstream layout and the rule that turns a shapesum
// into a threshold choice are this design's own choices, collected here.
package atr_pkg;

  // Chip and template geometry (demonstration board).
  localparam int unsigned CHIP_W   = 128;  // chip width in pixels
  localparam int unsigned CHIP_H   = 128;  // chip height in pixels
  localparam int unsigned TPL_K    = 8;    // template is TPL_K x TPL_K
  localparam int unsigned PIX_BITS = 8;    // bits per chip pixel (depth D)
  localparam int unsigned N_PAIRS  = 4;    // template pairs per configuration
  localparam int unsigned N_THRESH = 8;    // binary images, thresholds T0..T7
  localparam int unsigned N_GROUPS = 4;    // configurations per chip (16 pairs)

  // Configuration modes of the compute FPGA.
  typedef enum logic {
    MODE_SHAPESUM  = 1'b0,  // bit-plane correlation against the bright templates
    MODE_CORRELATE = 1'b1   // thresholded correlation against both templates
  } cfg_mode_e;

  // Fixed threshold levels T_i = 16*i + 8 (same for every template). They
  // span the lower half of the pixel range because a window is cut at about
  // half of its local bright level (see threshold_select).
  function automatic logic [7:0] threshold_level(int unsigned i);
    return 8'(16 * i + 8);
  endfunction

  // Length in bytes of one configuration bitstream: a header byte followed
  // by NP bright masks and NP surround masks, each K*K bits, least
  // significant byte first. Header bit 0 is the mode; in shapesum mode
  // header bit 1+t set means lane t leaves its partial sums untouched, so
  // that several shapesum configurations can fill one partial-sum word. Mask bit ty*K+tx is template row ty
  // (top row 0), column tx (left column 0).
  function automatic int unsigned cfg_len(int unsigned np, int unsigned k);
    return 1 + 2 * np * ((k * k + 7) / 8);
  endfunction

endpackage
