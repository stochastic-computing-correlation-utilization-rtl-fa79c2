// sc_lfsr: the single shared random number generator (RNG) of the SC datapath.
//
// A maximal-length Fibonacci linear-feedback shift register. Every stochastic
// number generator (SNG) of the design compares its operand against this one
// register value (or a fixed rearrangement of its bits), which is what makes
// the generated streams maximally correlated (SCC = 1) and lets one RNG serve
// any number of inputs.
//
// Consecutive states of a plain Fibonacci LFSR are shifted copies of each
// other, which makes consecutive comparator outputs strongly dependent and
// roughly doubles the error of short streams. The register therefore leaps
// STEPS single-bit shifts per clock (STEPS = WIDTH by default), so each clock
// presents a fresh WIDTH-bit value; the state sequence is still that of the
// same maximal-length LFSR (sampled every STEPS shifts), and since 2^WIDTH - 1
// is odd and STEPS a power of two the period is unchanged.
//
// Interface: `init` reloads SEED (synchronously, wins over `en`); `en` shifts
// the register once per clock; `rnd` is the current state, never zero.
// Timing: rnd changes one clock after an enabled edge. Reset also loads SEED.
// The source names an LFSR as the RNG; width, polynomial and seed are this
// design's choices (see sc_pkg::lfsr_taps).
module sc_lfsr
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = SC_WIDTH,
  parameter logic [WIDTH-1:0] SEED = SC_SEED[WIDTH-1:0],
  parameter int unsigned      STEPS = WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             en,
  output logic [WIDTH-1:0] rnd
);

  localparam logic [63:0] TAPS64 = lfsr_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS = TAPS64[WIDTH-1:0];

  // STEPS single-bit shifts of the register, unrolled into an XOR network.
  function automatic logic [WIDTH-1:0] leap(input logic [WIDTH-1:0] s);
    logic [WIDTH-1:0] v;
    v = s;
    for (int unsigned k = 0; k < STEPS; k++) v = {v[WIDTH-2:0], ^(v & TAPS)};
    return v;
  endfunction

  logic [WIDTH-1:0] state;

  assign rnd = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (init) state <= SEED;
    else if (en)   state <= leap(state);
  end

  initial begin
    assert (TAPS64 != '0) else $error("sc_lfsr: no polynomial for WIDTH=%0d", WIDTH);
    assert (SEED != '0) else $error("sc_lfsr: SEED must be non-zero");
  end

endmodule
