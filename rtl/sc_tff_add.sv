// sc_tff_add: scaled addition z = (x + y) / 2 whose MUX selector comes from a
// toggle flip-flop instead of an independent RNG.
//
// A 2-to-1 MUX passes x (select 0) or y (select 1). The select is the Q output
// of a T flip-flop (a JK flip-flop with J = K = T) whose T input is x XOR y, so
// the flip-flop changes state only in cycles where the two inputs differ. When
// x = y the MUX output is that common bit whatever the select; when they differ
// the MUX takes x and y in turn. The select has probability 0.5 and no
// correlation with the inputs, so no RNG is spent on it.
// With fully correlated inputs (both generated from the same random value, the
// intended use) the input that is 1 in a differing cycle is always the same
// one, so the output of the differing cycles alternates 1, 0, 1, ... and
// ones(z) = (ones(x) + ones(y)) / 2 rounded up or down: no random error is
// added. With uncorrelated inputs the result is still unbiased but random.
//
// Interface: `init` clears Q synchronously; `en` lets Q toggle (one SN bit per
// enabled clock). z is combinational from x, y and the current Q.
// The MUX with a flip-flop selector and the J = K = T connection follow the
// source; the XOR driving T and the reset value of Q are this design's choices.
module sc_tff_add (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic en,
  input  logic x,
  input  logic y,
  output logic z
);

  logic q;
  logic t;

  assign t = x ^ y;
  assign z = q ? y : x;

  // J = K = t: hold when t = 0, toggle when t = 1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (init)    q <= 1'b0;
    else if (en && t) q <= ~q;
  end

endmodule
