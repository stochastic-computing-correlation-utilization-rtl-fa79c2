// sc_sng: stochastic number generator, binary to stochastic conversion.
//
// A comparator: the output bit is 1 when the shared random value `rnd` is below
// the threshold derived from `value`, so over a full LFSR period the fraction of
// ones equals the threshold / 2^WIDTH.
//   BIPOLAR = 1: `value` is a two's-complement fraction x = value / 2^(WIDTH-1);
//                the threshold is p = (1 + x) / 2, i.e. value with its sign bit
//                inverted (x = -1 gives an all-zero stream).
//   BIPOLAR = 0: `value` is an unsigned probability p = value / 2^WIDTH (used
//                for MUX selector streams).
// Purely combinational; the bit is valid in the same cycle as `rnd`.
// The source describes the SNG as an RNG plus a comparator; the encodings are
// this design's choice.
module sc_sng
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH   = SC_WIDTH,
  parameter bit          BIPOLAR = 1'b1
) (
  input  logic [WIDTH-1:0] value,
  input  logic [WIDTH-1:0] rnd,
  output logic             sn
);

  logic [WIDTH-1:0] thr;

  always_comb begin
    thr = value;
    if (BIPOLAR) thr[WIDTH-1] = ~value[WIDTH-1];
    sn = (rnd < thr);
  end

endmodule
