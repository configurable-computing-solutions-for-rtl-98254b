// threshold_select: picks one of the eight correlation pairs of a template
// from its shapesum.
//
// The shapesum is the sum of the 8-bit chip pixels under the bright
// template's "on" pixels, i.e. n_on times the mean brightness there. The
// document says only that it is used for local gain control and selects the
// output pair passed on to peak detection. Here the pair of the highest
// threshold that half the mean bright-pixel value reaches is chosen:
//   sel = number of i in 1..NTH-1 with 2 * n_on * T_i <= shapesum
// so the binary image is cut at about half the local bright level: pixels
// of a bright return pass, shadowed (surround) pixels do not, whatever the
// overall gain of the chip. The products n_on * T_i need one
// constant-coefficient multiplier each.
// Purely combinational.
module threshold_select
  import atr_pkg::*;
#(
  parameter int unsigned NTH = 8,
  parameter int unsigned SW  = 14,  // shapesum width
  parameter int unsigned NW  = 7,   // width of the "on" pixel count
  parameter int unsigned CW  = 7    // correlation width
) (
  input  logic [SW-1:0]       shapesum,
  input  logic [NW-1:0]       n_on,
  input  logic [CW-1:0]       corr_b [NTH],  // bright correlation per threshold
  input  logic [CW-1:0]       corr_s [NTH],  // surround correlation per threshold
  output logic [$clog2(NTH)-1:0] sel,
  output logic [CW-1:0]       b_out,
  output logic [CW-1:0]       s_out
);

  localparam int unsigned LW = NW + 9;

  always_comb begin
    sel = '0;
    for (int i = 1; i < NTH; i++) begin
      if ((LW'(n_on) * LW'(threshold_level(i))) << 1 <= LW'(shapesum))
        sel = sel + 1'b1;
    end
    b_out = corr_b[sel];
    s_out = corr_s[sel];
  end

endmodule
