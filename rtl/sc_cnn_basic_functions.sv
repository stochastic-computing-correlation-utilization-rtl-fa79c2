// sc_cnn_basic_functions: the stochastic-computing CNN basic functions, inner
// product, max pooling, average pooling and ReLU, side by side on one shared
// random number generator.
//
// How it works. Binary operands (WIDTH-bit two's-complement fractions in
// [-1, 1)) are turned into bipolar stochastic numbers by comparators (sc_sng)
// against a single LFSR (sc_lfsr). Because every operand stream is compared
// against the same random value, the streams are maximally correlated, which
// the pooling and ReLU circuits exploit (an OR gate is then an exact max) and
// which the MUX-tree inner product and the T-FF average pooling tolerate. The
// only streams that must be uncorrelated are the inner-product MUX selectors:
// they reuse the same LFSR with its bits rotated by a different amount for
// each tree height, so one RNG still serves the whole design. N_IN may be any
// number from 2 up (Ch x K x K of a convolution); POOL_N must be a power of two
// because average pooling needs a balanced tree. Each function
// output is counted by an sc_counter over L clocks.
//
//   inner product  z_ip  = sum(h_i * x_i) / sum|h|   (sc_mux_tree_ip, N_IN inputs)
//   max pooling    z_mp  = max(pool_x)                (sc_maxpool)
//   average pool   z_ap  = mean(pool_x)               (sc_avgpool, T-FF selectors)
//   ReLU           z_relu = max(relu_x, 0)            (sc_relu)
//
// Interface. Operands must be stable from `start` until `done`. The weights of
// the inner product are given as their sign bits (ip_sgn, 1 = negative) and
// the N_IN - 1 selector probabilities ip_sel_p (unsigned fractions of 2^WIDTH),
// computed off line from the weight magnitudes: the selector of MUX m is
// sum|h| under its input 1 / sum|h| under both inputs (numbering as in
// sc_mux_tree_ip). `len` is the SN length L (1 .. 2^CNT_W - 1).
// The LFSR starts from SEED at reset and advances only while an evaluation
// runs; RESEED = 1 restarts it from SEED at every start instead.
// Timing: `done` rises L + 2 clocks after `start` and is high for one clock;
// the four *_count outputs then hold the number of ones N1 of each output
// stream, whose bipolar value is 2 * N1 / L - 1. They keep that value until the
// next start.
//
// The four functions, their gates and the shared RNG follow the source, as do
// the defaults (16 inputs, 32-bit operands, L up to 8192, 2x2 pooling). The
// controller, the bit rotation used for selector randomness, the shared pooling
// window and the port encodings are this design's choices.
module sc_cnn_basic_functions
  import sc_pkg::*;
#(
  parameter int unsigned      WIDTH  = SC_WIDTH,
  parameter int unsigned      N_IN   = SC_N_IN,
  parameter int unsigned      POOL_N = SC_POOL_K * SC_POOL_K,
  parameter int unsigned      CNT_W  = SC_CNT_W,
  parameter logic [WIDTH-1:0] SEED   = SC_SEED[WIDTH-1:0],
  parameter bit               RESEED = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [CNT_W-1:0]             len,
  // inner product
  input  logic [N_IN-1:0][WIDTH-1:0]   ip_x,
  input  logic [N_IN-1:0]              ip_sgn,
  input  logic [N_IN-2:0][WIDTH-1:0]   ip_sel_p,
  // pooling window (shared by max and average pooling)
  input  logic [POOL_N-1:0][WIDTH-1:0] pool_x,
  // activation
  input  logic [WIDTH-1:0]             relu_x,
  // results
  output logic                         busy,
  output logic                         done,
  output logic [CNT_W-1:0]             ip_count,
  output logic [CNT_W-1:0]             mp_count,
  output logic [CNT_W-1:0]             ap_count,
  output logic [CNT_W-1:0]             relu_count
);

  localparam int unsigned LEVELS = $clog2(N_IN);
  localparam int unsigned ROT    = WIDTH / (LEVELS + 1);

  // Height of MUX m in the tree of sc_mux_tree_ip (1 = fed by inputs only).
  // Heights strictly grow along every input-to-output path, so one random
  // value per height keeps the selectors on any path independent.
  function automatic int unsigned mux_level(input int unsigned m);
    int unsigned h [2*N_IN-1];
    for (int unsigned k = 0; k < 2 * N_IN - 1; k++) begin
      if (k < N_IN) h[k] = 0;
      else h[k] = 1 + ((h[2*(k-N_IN)] > h[2*(k-N_IN)+1]) ? h[2*(k-N_IN)] : h[2*(k-N_IN)+1]);
    end
    return h[N_IN + m];
  endfunction

  function automatic logic [WIDTH-1:0] rotl(input logic [WIDTH-1:0] v,
                                            input int unsigned k);
    return (k % WIDTH == 0) ? v : ((v << (k % WIDTH)) | (v >> (WIDTH - k % WIDTH)));
  endfunction

  // ---------------------------------------------------------------- control
  logic init, en;

  sc_ctrl #(.CNT_W(CNT_W)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .len  (len),
    .init (init),
    .en   (en),
    .done (done),
    .busy (busy)
  );

  // ------------------------------------------------------------- shared RNG
  logic [WIDTH-1:0] rnd;

  // With RESEED = 0 the LFSR continues from one evaluation to the next, so
  // successive evaluations see fresh random values; with RESEED = 1 every
  // evaluation replays the sequence from SEED (repeatable results).
  sc_lfsr #(.WIDTH(WIDTH), .SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .init (RESEED ? init : 1'b0),
    .en   (en),
    .rnd  (rnd)
  );

  // ---------------------------------------------------------- inner product
  logic [N_IN-1:0] ip_sn;
  logic [N_IN-2:0] sel_sn;
  logic            ip_z;

  for (genvar i = 0; i < N_IN; i++) begin : g_ip_sng
    sc_sng #(.WIDTH(WIDTH), .BIPOLAR(1'b1)) u_sng (
      .value(ip_x[i]),
      .rnd  (rnd),
      .sn   (ip_sn[i])
    );
  end

  for (genvar m = 0; m < N_IN - 1; m++) begin : g_sel_sng
    logic [WIDTH-1:0] sel_rnd;
    assign sel_rnd = rotl(rnd, mux_level(m) * ROT);
    sc_sng #(.WIDTH(WIDTH), .BIPOLAR(1'b0)) u_sng (
      .value(ip_sel_p[m]),
      .rnd  (sel_rnd),
      .sn   (sel_sn[m])
    );
  end

  sc_mux_tree_ip #(.N_IN(N_IN)) u_ip (
    .x  (ip_sn),
    .sgn(ip_sgn),
    .sel(sel_sn),
    .z  (ip_z)
  );

  // ---------------------------------------------------------------- pooling
  logic [POOL_N-1:0] pool_sn;
  logic              mp_z, ap_z;

  for (genvar i = 0; i < POOL_N; i++) begin : g_pool_sng
    sc_sng #(.WIDTH(WIDTH), .BIPOLAR(1'b1)) u_sng (
      .value(pool_x[i]),
      .rnd  (rnd),
      .sn   (pool_sn[i])
    );
  end

  sc_maxpool #(.N_IN(POOL_N)) u_mp (
    .x(pool_sn),
    .z(mp_z)
  );

  sc_avgpool #(.N_IN(POOL_N)) u_ap (
    .clk  (clk),
    .rst_n(rst_n),
    .init (init),
    .en   (en),
    .x    (pool_sn),
    .z    (ap_z)
  );

  // ------------------------------------------------------------- activation
  logic relu_sn, relu_z;

  sc_sng #(.WIDTH(WIDTH), .BIPOLAR(1'b1)) u_relu_sng (
    .value(relu_x),
    .rnd  (rnd),
    .sn   (relu_sn)
  );

  sc_relu #(.WIDTH(WIDTH)) u_relu (
    .x  (relu_sn),
    .rnd(rnd),
    .z  (relu_z)
  );

  // ------------------------------------------------ stochastic to binary
  sc_counter #(.CNT_W(CNT_W)) u_cnt_ip (
    .clk(clk), .rst_n(rst_n), .clear(init), .en(en), .sn(ip_z), .count(ip_count));
  sc_counter #(.CNT_W(CNT_W)) u_cnt_mp (
    .clk(clk), .rst_n(rst_n), .clear(init), .en(en), .sn(mp_z), .count(mp_count));
  sc_counter #(.CNT_W(CNT_W)) u_cnt_ap (
    .clk(clk), .rst_n(rst_n), .clear(init), .en(en), .sn(ap_z), .count(ap_count));
  sc_counter #(.CNT_W(CNT_W)) u_cnt_relu (
    .clk(clk), .rst_n(rst_n), .clear(init), .en(en), .sn(relu_z), .count(relu_count));

endmodule
