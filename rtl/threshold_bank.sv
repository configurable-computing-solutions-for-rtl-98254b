// threshold_bank: builds the eight binary images of the correlation step.
//
// The document correlates eight binary images, each made by applying a
// different fixed threshold to the chip. This block does that for one pixel:
// bit i of the result is 1 when the pixel is at or above threshold T_i. The
// threshold levels are not given by the document; the default is
// T_i = 16*i + 8 (atr_pkg::threshold_level). Purely combinational.
module threshold_bank
  import atr_pkg::*;
#(
  parameter int unsigned PW  = 8,
  parameter int unsigned NTH = 8
) (
  input  logic [PW-1:0]  pix,
  output logic [NTH-1:0] bin
);

  always_comb begin
    for (int i = 0; i < NTH; i++)
      bin[i] = (PW'(pix) >= PW'(threshold_level(i)));
  end

endmodule
