// tb_sc_error_sweep: accuracy sweep of the SC CNN basic functions over the SN
// lengths L = 64 .. 8192 and inner-product sizes N_in = 2, 4, 8, 16, with the
// design at its default parameters.
// Smaller inner products use the 16-input tree with the unused weights set to
// zero (their selectors steer away from them). Each point averages the absolute
// error of TRIALS random operand sets against real-valued references:
// (h . x) / sum|h|, max of the 2x2 window, its mean, and max(x, 0).
// It prints one line per L next to the published MUX-tree errors for the same
// N_in and L, and checks that:
//   - every mean error stays below 1.3 / sqrt(L) + 2^-10, i.e. within the
//     binomial error of a single stream of L independent bits (about
//     0.8 / sqrt(L) for p = 0.5) plus margin for 12-48 samples per point;
//   - every error at L = 8192 is at least three times smaller than at L = 64.
// The published errors (x 10^-2; N_in=2: 3.3 .. 0.25, N_in=16: 5.45 .. 0.47)
// lie below that binomial level, so they are printed for comparison only.
module tb_sc_error_sweep;
  import sc_pkg::*;

  localparam int W      = SC_WIDTH;
  localparam int N      = SC_N_IN;
  localparam int P      = SC_POOL_K * SC_POOL_K;
  localparam int CW     = SC_CNT_W;
  localparam int TRIALS = 12;

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

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real val(input logic [W-1:0] v);
    return $itor($signed(v)) / 2147483648.0;
  endfunction

  // Published mean absolute errors x 10^-2, rows N_in = 2, 4, 8, 16.
  real pub [4][8] = '{
    '{3.3,  2.2,  1.49, 1.02, 0.73, 0.51, 0.36, 0.25},
    '{4.48, 3.07, 2.13, 1.48, 1.05, 0.74, 0.53, 0.37},
    '{5.03, 3.6,  2.47, 1.74, 1.22, 0.86, 0.62, 0.42},
    '{5.45, 3.81, 2.66, 1.85, 1.32, 0.94, 0.66, 0.47}};

  real e_ip [4][8];
  real e_mp [8], e_ap [8], e_relu [8];

  task automatic run_one(input int L);
    len = CW'(L);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int li = 0; li < 8; li++) begin
      int L;
      L = 64 << li;
      e_mp[li] = 0.0; e_ap[li] = 0.0; e_relu[li] = 0.0;
      for (int ni = 0; ni < 4; ni++) begin
        int nin;
        nin = 2 << ni;
        e_ip[ni][li] = 0.0;
        for (int t = 0; t < TRIALS; t++) begin
          real h [N], wabs [2*N-1], ideal, mx, mean, rl;
          for (int i = 0; i < N; i++) begin
            int hi;
            hi = $urandom_range(1, 2000);
            h[i] = (i < nin) ? (hi - 1000.5) / 1000.0 : 0.0;
            ip_x[i] = $urandom;
            ip_sgn[i] = h[i] < 0.0;
            wabs[i] = rabs(h[i]);
          end
          for (int m = 0; m < N - 1; m++) begin
            real p;
            wabs[N + m] = wabs[2*m] + wabs[2*m + 1];
            p = (wabs[N + m] > 0.0) ? wabs[2*m + 1] / wabs[N + m] * 4294967296.0 : 2147483648.0;
            ip_sel_p[m] = (p >= 4294967295.0) ? 32'hFFFF_FFFF : 32'(longint'(p));
          end
          ideal = 0.0;
          for (int i = 0; i < N; i++) ideal += h[i] * val(ip_x[i]);
          ideal /= wabs[2*N - 2];
          mx = -1.0; mean = 0.0;
          for (int i = 0; i < P; i++) begin
            pool_x[i] = $urandom;
            if (val(pool_x[i]) > mx) mx = val(pool_x[i]);
            mean += val(pool_x[i]) / P;
          end
          relu_x = $urandom;
          rl = (val(relu_x) > 0.0) ? val(relu_x) : 0.0;
          run_one(L);
          e_ip[ni][li] += rabs(2.0 * ip_count / L - 1.0 - ideal) / TRIALS;
          e_mp[li]     += rabs(2.0 * mp_count / L - 1.0 - mx) / (4 * TRIALS);
          e_ap[li]     += rabs(2.0 * ap_count / L - 1.0 - mean) / (4 * TRIALS);
          e_relu[li]   += rabs(2.0 * relu_count / L - 1.0 - rl) / (4 * TRIALS);
        end
        check(e_ip[ni][li] < 1.3 / $sqrt(L) + 1.0 / 1024,
              $sformatf("inner product N_in=%0d L=%0d error %f", nin, L, e_ip[ni][li]));
      end
      $display("L=%5d  IP N2 %7.4f N4 %7.4f N8 %7.4f N16 %7.4f | maxpool %7.4f avgpool %7.4f relu %7.4f",
               L, e_ip[0][li], e_ip[1][li], e_ip[2][li], e_ip[3][li], e_mp[li], e_ap[li], e_relu[li]);
      $display("   published IP  N2 %7.4f N4 %7.4f N8 %7.4f N16 %7.4f",
               pub[0][li] / 100, pub[1][li] / 100, pub[2][li] / 100, pub[3][li] / 100);
      check(e_mp[li]   < 1.3 / $sqrt(L) + 1.0 / 1024, $sformatf("max pool error L=%0d", L));
      check(e_ap[li]   < 1.3 / $sqrt(L) + 1.0 / 1024, $sformatf("avg pool error L=%0d", L));
      check(e_relu[li] < 1.3 / $sqrt(L) + 1.0 / 1024, $sformatf("relu error L=%0d", L));
    end
    for (int ni = 0; ni < 4; ni++)
      check(e_ip[ni][7] * 3.0 < e_ip[ni][0], $sformatf("inner product N_in=%0d error falls with L", 2 << ni));
    check(e_mp[7] * 3.0 < e_mp[0] && e_ap[7] * 3.0 < e_ap[0] && e_relu[7] * 3.0 < e_relu[0],
          "pooling and ReLU errors fall with L");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
