// sc_relu: rectified linear unit max(x, 0) on a bipolar stochastic number.
//
// ReLU is a max against zero, so it is built like max pooling: the input stream
// is ORed with a stream of bipolar value 0 (probability 0.5) that is generated
// from the same random value `rnd` as the input, making the two fully
// correlated. For an input generated as rnd < p, the OR is rnd < max(p, 0.5),
// i.e. the stream of max(x, 0). The zero stream comes from an internal sc_sng
// with a constant operand 0; for a random value of WIDTH bits that stream is
// simply the inverted MSB of rnd.
// Purely combinational. The input must have been generated from `rnd`
// (correlated with the zero reference); that requirement, and the OR gate,
// follow the source.
module sc_relu
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = SC_WIDTH
) (
  input  logic             x,
  input  logic [WIDTH-1:0] rnd,
  output logic             z
);

  logic zero_sn;

  sc_sng #(.WIDTH(WIDTH), .BIPOLAR(1'b1)) u_zero (
    .value('0),
    .rnd  (rnd),
    .sn   (zero_sn)
  );

  assign z = x | zero_sn;

endmodule
