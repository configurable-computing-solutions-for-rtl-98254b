// template_correlator: the 1-bit correlator "C" of the ATR datapath.
//
// It counts the binary window pixels that lie under the "on" pixels of a
// binary template: out = sum_i (bits[i] & mask[i]). The sum is formed by a
// balanced tree of adders, pairwise at every level, which is the structure the
// document maps each template onto. The document hard-wires the template
// into the FPGA; here the mask is an input, loaded with the configuration.
// When the mask is a constant, synthesis removes every adder input whose mask
// bit is 0, leaving the sparse template-specific tree.
//
// Purely combinational; N = K*K bits, result width $clog2(N+1).
module template_correlator #(
  parameter int unsigned N  = 64,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  input  logic [N-1:0]  mask,
  output logic [CW-1:0] sum
);

  // Leaves padded to a power of two; node 0 is the root, node i has
  // children 2i+1 and 2i+2, leaves sit at P-1 .. 2P-2.
  localparam int unsigned P = (N <= 1) ? 1 : (1 << $clog2(N));

  logic [CW-1:0] node [2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_used
      assign node[P-1+i] = CW'(bits[i] & mask[i]);
    end else begin : g_pad
      assign node[P-1+i] = '0;
    end
  end

  for (genvar i = 0; i < P - 1; i++) begin : g_add
    assign node[i] = node[2*i+1] + node[2*i+2];
  end

  assign sum = node[0];

endmodule
