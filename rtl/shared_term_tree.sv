// shared_term_tree: five template correlations built from shared adder-tree
// terms, the template-grouping example of the original system.
//
// When several hard-wired templates share "on" pixels, the pixels are split
// into terms: groups of pixels needed by the same set of templates. Each term
// is one popcount of the window (an ordinary template_correlator over the
// term's pixels), and each template's correlation is a sum of terms. The five
// templates A..E of the example are
//
//   A = 1 + 2 + 5 + 6 + 7 + 9      B = 4 + 5 + 6 + 7 + 10
//   C = 1 + 2 + 3 + 5 + 6          D = 1 + 5
//   E = 4 + 5 + 6 + 7 + 8
//
// Summed one by one that is 18 term additions. The pair that occurs most
// often is added once and reused: 5 + 6 appears in four templates and
// becomes term 11. These term lists and term 11 follow the original example.
// Continuing the same rule is this design's own step: 11 + 7 (three
// templates) becomes term 12, then 1 + 2 and 4 + 12 (two templates each)
// become terms 13 and 14. That leaves 11 additions in all.
//
// Interface: term[1..10] are the ten term counts, tpl[0..4] the correlations
// of templates A..E. Purely combinational, like the per-template trees.
// All outputs share one width, so the top two bits of D, a sum of only two
// terms, are always zero.
module shared_term_tree #(
  parameter int unsigned TCW = 7,        // term count width (8 x 8 window)
  parameter int unsigned OW  = TCW + 3   // room for six terms
) (
  input  logic [TCW-1:0] term [1:10],
  output logic [OW-1:0]  tpl  [5]
);

  logic [OW-1:0] t11, t12, t13, t14;

  assign t11 = OW'(term[5]) + OW'(term[6]);
  assign t12 = t11 + OW'(term[7]);
  assign t13 = OW'(term[1]) + OW'(term[2]);
  assign t14 = OW'(term[4]) + t12;

  assign tpl[0] = t13 + t12 + OW'(term[9]);    // A
  assign tpl[1] = t14 + OW'(term[10]);         // B
  assign tpl[2] = t13 + OW'(term[3]) + t11;    // C
  assign tpl[3] = OW'(term[1]) + OW'(term[5]); // D
  assign tpl[4] = t14 + OW'(term[8]);          // E

endmodule
