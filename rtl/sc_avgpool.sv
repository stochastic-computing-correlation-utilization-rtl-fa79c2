// sc_avgpool: average pooling z = (1 / N_IN) * sum x_i of stochastic numbers.
//
// A balanced tree of N_IN - 1 scaled adders (sc_tff_add): each is a two-to-one
// MUX whose selector is a toggle flip-flop driven by the XOR of its two inputs.
// No RNG is needed for any selector, and the inputs may have any correlation.
// With fully correlated inputs (one shared RNG) the first level halves its
// inputs' one-counts exactly; the deeper levels see partly correlated streams
// and add a small random error, far below that of RNG-driven selectors.
// Adder numbering is as in sc_mux_tree_ip: adder m combines nodes 2m and 2m + 1.
//
// Interface: `init` clears all flip-flops; `en` marks clocks carrying a valid
// SN bit. z is combinational from the inputs and the flip-flop states.
// The MUX tree with T-FF selectors follows the source; N_IN = 4 (2x2 window)
// is its example. The tree shape for larger N_IN is this design's choice.
module sc_avgpool
  import sc_pkg::*;
#(
  parameter int unsigned N_IN = SC_POOL_K * SC_POOL_K
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            en,
  input  logic [N_IN-1:0] x,
  output logic            z
);

  logic [2*N_IN-2:0] node;

  assign node[N_IN-1:0] = x;

  for (genvar m = 0; m < N_IN - 1; m++) begin : g_add
    sc_tff_add u_add (
      .clk  (clk),
      .rst_n(rst_n),
      .init (init),
      .en   (en),
      .x    (node[2*m]),
      .y    (node[2*m + 1]),
      .z    (node[N_IN + m])
    );
  end

  assign z = node[2*N_IN - 2];

  initial assert (N_IN >= 2 && (N_IN & (N_IN - 1)) == 0)
    else $error("sc_avgpool: N_IN=%0d is not a power of two", N_IN);

endmodule
