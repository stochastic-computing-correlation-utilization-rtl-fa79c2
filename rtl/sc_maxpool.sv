// sc_maxpool: max pooling of N_IN stochastic numbers with one OR tree.
//
// When all inputs come from the same random value (SCC = 1), input i is 1
// exactly when rnd < p_i, so the OR of the inputs is 1 exactly when
// rnd < max(p_i): the OR stream is the stream of the maximum. Inversion-free
// and monotonic, this holds in the bipolar domain too. A 2x2 window (the usual
// K = 2, S = 2 case) takes three two-input ORs, drawn as a tree of two ORs
// feeding a third; the tree is written out pairwise here for any power-of-two
// N_IN. Purely combinational, one output bit per input bit.
// The result is exact only for fully correlated inputs; that requirement and
// the OR structure follow the source.
module sc_maxpool
  import sc_pkg::*;
#(
  parameter int unsigned N_IN = SC_POOL_K * SC_POOL_K
) (
  input  logic [N_IN-1:0] x,
  output logic            z
);

  logic [2*N_IN-2:0] node;

  assign node[N_IN-1:0] = x;

  for (genvar m = 0; m < N_IN - 1; m++) begin : g_or
    assign node[N_IN + m] = node[2*m] | node[2*m + 1];
  end

  assign z = node[2*N_IN - 2];

  initial assert (N_IN >= 2)
    else $error("sc_maxpool: N_IN=%0d, at least 2 inputs needed", N_IN);

endmodule
