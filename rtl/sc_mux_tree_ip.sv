// sc_mux_tree_ip: stochastic inner product of N_IN bipolar inputs with signed
// weights, built as a MUX tree.
//
// Output value z = (h . x) / sum|h|. Each input bit x_i is XORed with the sign
// bit s_i of its weight (bipolar negation is inversion), then a balanced tree of
// N_IN - 1 two-to-one MUXs selects one of the signed inputs per clock. The
// selector stream of MUX m must have probability
//   sl_m = sum|h| under input 1 of m / sum|h| under both inputs of m,
// so every input reaches the output with probability |h_i| / sum|h|, which
// computes the weighted sum without any multiplier or adder. The weights'
// magnitudes therefore live only in the selector probabilities, computed once
// off line from the trained weights. The inputs may be fully correlated (all
// generated from one RNG); the selectors of different tree levels must be
// uncorrelated with each other and with the inputs.
//
// MUX numbering (matches the 16-input drawing M1..M15, 0-based here): MUX m
// drives node N_IN + m from nodes 2m (select 0) and 2m + 1 (select 1); nodes
// 0 .. N_IN-1 are the XOR outputs; node 2*N_IN - 2 is the result. So MUX 0
// combines inputs 0 and 1, and MUX N_IN - 2 is the root. For a power of two
// this is the balanced tree (for 16 inputs MUX 8 combines MUX 0 and MUX 1).
// The same rule builds a valid tree of height ceil(log2(N_IN)) for any
// N_IN >= 2, e.g. 9 or 27 inputs for a 3x3 kernel over 1 or 3 channels.
// sel[m] is the selector bit of MUX m. Selectors of MUXs at the same height
// never share a path and may share a random source; MUXs of different heights
// need independent ones. Purely combinational, one output bit per clock.
module sc_mux_tree_ip
  import sc_pkg::*;
#(
  parameter int unsigned N_IN = SC_N_IN
) (
  input  logic [N_IN-1:0] x,     // input SN bits
  input  logic [N_IN-1:0] sgn,   // weight signs, 1 = negative
  input  logic [N_IN-2:0] sel,   // selector SN bits, one per MUX
  output logic            z
);

  logic [2*N_IN-2:0] node;

  assign node[N_IN-1:0] = x ^ sgn;

  for (genvar m = 0; m < N_IN - 1; m++) begin : g_mux
    assign node[N_IN + m] = sel[m] ? node[2*m + 1] : node[2*m];
  end

  assign z = node[2*N_IN - 2];

  initial assert (N_IN >= 2)
    else $error("sc_mux_tree_ip: N_IN=%0d, at least 2 inputs needed", N_IN);

endmodule
