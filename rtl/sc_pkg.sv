// sc_pkg: constants and helpers shared by the stochastic-computing (SC) CNN
// basic-function blocks.
//
// Numbers travel as bipolar stochastic numbers (SNs): a bit-stream of length L
// whose value is x = (N1 - N0) / L, where N1 and N0 count its ones and zeros.
// Binary operands are WIDTH-bit two's-complement fractions, x = v / 2^(WIDTH-1),
// so the probability of a one, p = (1 + x) / 2, is simply v with its sign bit
// inverted, read as an unsigned fraction of 2^WIDTH.
//
// The defaults follow the evaluated configuration: 16-input inner product,
// 32-bit binary precision, SN lengths up to 8192 bits, 2x2 pooling windows.
// lfsr_taps() returns a maximal-length feedback polynomial for a few register
// widths (the polynomial choice is this design's own; the source only says the
// random number generator is an LFSR).
package sc_pkg;

  localparam int unsigned SC_WIDTH   = 32;    // binary precision n
  localparam int unsigned SC_N_IN    = 16;    // inner-product inputs N_in
  localparam int unsigned SC_POOL_K  = 2;     // pooling kernel K (stride 2)
  localparam int unsigned SC_MAX_LEN = 8192;  // longest SN length L
  localparam int unsigned SC_CNT_W   = $clog2(SC_MAX_LEN + 1);
  // LFSR seed, truncated to the register width. A well-mixed value: a seed
  // such as 1 would start every run with a string of tiny random values and
  // bias short streams.
  localparam logic [63:0] SC_SEED    = 64'h9E37_79B9_7F4A_7C15;

  // Controller states of one SN evaluation.
  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,   // waiting for start
    CTRL_INIT = 2'd1,   // one cycle: reseed RNG, clear counters and T-FFs
    CTRL_RUN  = 2'd2,   // L cycles, one SN bit per cycle
    CTRL_DONE = 2'd3    // one cycle: counters hold the result
  } ctrl_state_e;

  // Tap mask (bit i set = register bit i feeds the XOR) of a maximal-length
  // Fibonacci LFSR that shifts towards the MSB. Returns 0 for an unsupported width.
  function automatic logic [63:0] lfsr_taps(input int unsigned w);
    logic [63:0] m;
    m = '0;
    case (w)
      4:  begin m[3]  = 1'b1; m[2]  = 1'b1; end
      8:  begin m[7]  = 1'b1; m[5]  = 1'b1; m[4]  = 1'b1; m[3]  = 1'b1; end
      10: begin m[9]  = 1'b1; m[6]  = 1'b1; end
      12: begin m[11] = 1'b1; m[5]  = 1'b1; m[3]  = 1'b1; m[0]  = 1'b1; end
      16: begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3]  = 1'b1; end
      24: begin m[23] = 1'b1; m[22] = 1'b1; m[21] = 1'b1; m[16] = 1'b1; end
      32: begin m[31] = 1'b1; m[21] = 1'b1; m[1]  = 1'b1; m[0]  = 1'b1; end
      64: begin m[63] = 1'b1; m[62] = 1'b1; m[60] = 1'b1; m[59] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

endpackage
