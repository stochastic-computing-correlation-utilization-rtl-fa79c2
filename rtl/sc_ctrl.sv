// sc_ctrl: sequences one stochastic evaluation of length L.
//
// SC processes one bit of every stream per clock, so an evaluation is L clocks
// long. On `start` (sampled in IDLE) the controller latches `len` (L, 1 to
// 2^CNT_W - 1), spends one INIT cycle with `init` high (reseed the RNG, clear
// the counters and T flip-flops), then RUN for exactly L cycles with `en` high,
// then one DONE cycle with `done` high, when the counters hold the result.
// Start-to-done latency is L + 2 clocks; `busy` is high from INIT to DONE.
// A `len` of 0 is treated as 1. The sequencing is this design's own: the source
// fixes only one bit per clock and the length L.
module sc_ctrl
  import sc_pkg::*;
#(
  parameter int unsigned CNT_W = SC_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] len,
  output logic             init,
  output logic             en,
  output logic             done,
  output logic             busy
);

  ctrl_state_e      state;
  logic [CNT_W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CTRL_IDLE;
      remaining <= '0;
    end else begin
      unique case (state)
        CTRL_IDLE: if (start) begin
          state     <= CTRL_INIT;
          remaining <= (len == '0) ? CNT_W'(1) : len;
        end
        CTRL_INIT: state <= CTRL_RUN;
        CTRL_RUN: begin
          remaining <= remaining - 1'b1;
          if (remaining == CNT_W'(1)) state <= CTRL_DONE;
        end
        CTRL_DONE: state <= CTRL_IDLE;
        default:   state <= CTRL_IDLE;
      endcase
    end
  end

  assign init = (state == CTRL_INIT);
  assign en   = (state == CTRL_RUN);
  assign done = (state == CTRL_DONE);
  assign busy = (state != CTRL_IDLE);

  // The run phase never starts with nothing left to count.
  a_run_nonzero: assert property (@(posedge clk)
    (state == CTRL_RUN) |-> (remaining != '0));

endmodule
