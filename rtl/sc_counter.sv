// sc_counter: stochastic to binary conversion.
//
// Counts the ones of a stochastic number while `en` is high. With L bits counted
// the bipolar value of the stream is x = 2 * count / L - 1.
// `clear` zeroes the count synchronously (and wins over `en`). The count is
// valid one clock after the last enabled bit. CNT_W must hold the longest L
// (8192 needs 14 bits). The source only says a counter performs this conversion.
module sc_counter
  import sc_pkg::*;
#(
  parameter int unsigned CNT_W = SC_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             sn,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         count <= '0;
    else if (clear)     count <= '0;
    else if (en && sn)  count <= count + 1'b1;
  end

endmodule
