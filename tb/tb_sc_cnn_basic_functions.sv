// tb_sc_cnn_basic_functions: end-to-end test of the SC CNN basic functions at
// their default sizes (16-input inner product, 32-bit operands, 2x2 pooling,
// L up to 8192).
// Each run loads random operands, pulses start with an SN length L and waits
// for done. The testbench keeps its own model of the 32-bit LFSR sequence
// (x^32 + x^22 + x^2 + x + 1, 32 shifts per clock, seed 7F4A7C15 hex at reset,
// continuing from run to run) and from it
// works out the exact expected counts of the correlation-based functions:
//   max pooling: ones of a stream of the window maximum, exactly;
//   ReLU:        ones of a stream of max(x, 0), exactly;
//   avg pooling: within 1 + 2 sqrt(L) of the mean of the window's input counts;
// and checks the inner product against (h . x) / sum|h| within 5/sqrt(L) + 0.02.
// It also checks that done comes L + 2 clocks after start, and counts how often
// each mechanism was exercised: negative weights (sign inversion), a ReLU that
// clamps and one that passes, a max that is not the first window element,
// pooling windows whose inputs differ (T-FF toggling), the longest L, and a
// start issued right after done.
module tb_sc_cnn_basic_functions;
  import sc_pkg::*;

  localparam int W  = SC_WIDTH;
  localparam int N  = SC_N_IN;
  localparam int P  = SC_POOL_K * SC_POOL_K;
  localparam int CW = SC_CNT_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CW-1:0] len = '0;
  logic [N-1:0][W-1:0] ip_x;
  logic [N-1:0]        ip_sgn;
  logic [N-2:0][W-1:0] ip_sel_p;
  logic [P-1:0][W-1:0] pool_x;
  logic [W-1:0]        relu_x;
  logic busy, done;
  logic [CW-1:0] ip_count, mp_count, ap_count, relu_count;

  int checks = 0, failures = 0;
  int n_neg_w = 0, n_relu_clamp = 0, n_relu_pass = 0, n_max_not_first = 0;
  int n_pool_differ = 0, n_len_max = 0, n_back_to_back = 0;

  always #5 clk = ~clk;

  sc_cnn_basic_functions dut (
    .clk, .rst_n, .start, .len, .ip_x, .ip_sgn, .ip_sel_p, .pool_x, .relu_x,
    .busy, .done, .ip_count, .mp_count, .ap_count, .relu_count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // threshold of a bipolar operand: (1 + x) / 2 * 2^32
  function automatic longint thr(input logic [W-1:0] v);
    return longint'($signed(v)) + 64'sd2147483648;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [W-1:0] rand_operand();
    return $urandom;
  endfunction

  real ip_err_256 = 0.0;
  int  n_256 = 0;

  initial begin
    int L, lat, e_mp, e_relu, e_ap_sum, run_lens [12];
    longint t_max, t_relu;
    real h [N], wabs [2*N-1], ideal, est, err, sum_abs, tol;
    logic [31:0] r, r_run;
    run_lens = '{64, 256, 256, 256, 1024, 8192, 128, 512, 2048, 4096, 256, 1000};

    r_run = 32'h7F4A_7C15;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int run = 0; run < 24; run++) begin
      L = run_lens[run % 12];
      // operands
      for (int i = 0; i < N; i++) begin
        int hi;
        hi = $urandom_range(0, 2000);
        h[i] = (hi - 1000) / 1000.0;
        if (h[i] == 0.0) h[i] = 0.001;
        ip_x[i] = rand_operand();
        ip_sgn[i] = h[i] < 0.0;
        wabs[i] = (h[i] < 0.0) ? -h[i] : h[i];
        if (ip_sgn[i]) n_neg_w++;
      end
      for (int m = 0; m < N - 1; m++) begin
        real p;
        wabs[N + m] = wabs[2*m] + wabs[2*m + 1];
        p = wabs[2*m + 1] / wabs[N + m] * 4294967296.0;
        ip_sel_p[m] = (p >= 4294967295.0) ? 32'hFFFF_FFFF : 32'(longint'(p));
      end
      sum_abs = wabs[2*N - 2];
      ideal = 0.0;
      for (int i = 0; i < N; i++) ideal += h[i] * $itor($signed(ip_x[i])) / 2147483648.0;
      ideal /= sum_abs;
      for (int i = 0; i < P; i++) pool_x[i] = rand_operand();
      if (run % 5 == 0) pool_x[1] = pool_x[0];      // a tie in the window
      relu_x = rand_operand();
      relu_x[W-1] = run[0];                         // alternate sign
      if (relu_x[W-1]) n_relu_clamp++; else n_relu_pass++;

      t_max = thr(pool_x[0]);
      for (int i = 1; i < P; i++) if (thr(pool_x[i]) > t_max) t_max = thr(pool_x[i]);
      if (t_max != thr(pool_x[0])) n_max_not_first++;
      for (int i = 1; i < P; i++) if (pool_x[i] != pool_x[0]) begin n_pool_differ++; break; end
      t_relu = (thr(relu_x) > 64'sd2147483648) ? thr(relu_x) : 64'sd2147483648;
      if (L == 8192) n_len_max++;

      // expected counts from the LFSR model
      e_mp = 0; e_relu = 0; e_ap_sum = 0;
      r = r_run;
      for (int b = 0; b < L; b++) begin
        if (longint'(r) < t_max) e_mp++;
        if (longint'(r) < t_relu) e_relu++;
        for (int i = 0; i < P; i++) if (longint'(r) < thr(pool_x[i])) e_ap_sum++;
        repeat (32) r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      end
      r_run = r;

      // run
      len = CW'(L);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 20000) begin
        @(negedge clk);
        lat++;
      end
      check(lat === L + 2, $sformatf("latency L+2 = %0d, got %0d", L + 2, lat));
      check(int'(mp_count) === e_mp, $sformatf("max pool count %0d expected %0d", mp_count, e_mp));
      check(int'(relu_count) === e_relu, $sformatf("relu count %0d expected %0d", relu_count, e_relu));
      check(rabs(ap_count - e_ap_sum / 4.0) <= 1.0 + 2.0 * $sqrt(L),
            $sformatf("avg pool count %0d expected %f", ap_count, e_ap_sum / 4.0));
      est = 2.0 * ip_count / L - 1.0;
      err = rabs(est - ideal);
      tol = 5.0 / $sqrt(L) + 0.02;
      check(err <= tol, $sformatf("inner product L=%0d est %f ideal %f", L, est, ideal));
      if (L == 256) begin
        ip_err_256 += err;
        n_256++;
      end
      // done lasts one clock; the controller is idle on the next one, where
      // some runs start again immediately
      @(negedge clk);
      check(!done && !busy, "idle after done");
      if (run % 4 == 3) begin
        n_back_to_back++;
      end else begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("inner product mean |error| at L=256 over %0d runs: %f", n_256, ip_err_256 / n_256);
    $display("mechanisms: neg_weight=%0d relu_clamp=%0d relu_pass=%0d max_not_first=%0d pool_differ=%0d len8192=%0d back_to_back=%0d",
             n_neg_w, n_relu_clamp, n_relu_pass, n_max_not_first, n_pool_differ, n_len_max, n_back_to_back);
    check(n_neg_w > 0, "negative weights exercised");
    check(n_relu_clamp > 0 && n_relu_pass > 0, "ReLU clamp and pass exercised");
    check(n_max_not_first > 0, "max elsewhere than the first element");
    check(n_pool_differ > 0, "differing pooling inputs");
    check(n_len_max > 0, "longest SN length");
    check(n_back_to_back > 0, "start right after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
