// tb_sc_mux_tree_ip: self-checking test of the MUX-tree inner product.
// 1) Bit level, 16, 4 and 9 inputs: random inputs, signs and selector bits
//    against the sum-of-products form of the tree, Z = OR_i ((s_i ^ x_i) & SM_i),
//    where SM_i ANDs the selector bit (or its inverse) of every MUX on input
//    i's path (node k feeds MUX k/2 on its input k%2).
// 2) Value level, 16 and 9 inputs: random bipolar inputs and weights, streams
//    drawn from one shared random value for the inputs and an independent one
//    per MUX height for the selectors (probabilities from the weight
//    magnitudes); the decoded output must be near (h . x) / sum|h|.
module tb_sc_mux_tree_ip;
  localparam int N = 16;
  logic [N-1:0] x, sgn;
  logic [N-2:0] sel;
  logic         z;
  logic [3:0]   x4, sgn4;
  logic [2:0]   sel4;
  logic         z4;
  logic [8:0]   x9, sgn9;
  logic [7:0]   sel9;
  logic         z9;
  int checks = 0, failures = 0;
  int sizes [2] = '{16, 9};

  sc_mux_tree_ip                u16 (.x, .sgn, .sel, .z);
  sc_mux_tree_ip #(.N_IN(4))    u4  (.x(x4), .sgn(sgn4), .sel(sel4), .z(z4));
  sc_mux_tree_ip #(.N_IN(9))    u9  (.x(x9), .sgn(sgn9), .sel(sel9), .z(z9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sum-of-products reference for the tree of n inputs: node k (input or MUX
  // output) feeds MUX k/2 on input k%2; MUX m's output is node n + m.
  function automatic bit sop(input int n, input logic [15:0] xi, input logic [15:0] si,
                             input logic [14:0] sl);
    bit res = 1'b0;
    for (int i = 0; i < n; i++) begin
      bit sm = 1'b1;
      int k = i;
      while (k != 2 * n - 2) begin
        int m = k / 2;
        sm &= (k % 2) ? sl[m] : ~sl[m];
        k = n + m;
      end
      res |= (xi[i] ^ si[i]) & sm;
    end
    return res;
  endfunction

  // Height of MUX m (1 = fed by inputs only) in the tree of n inputs.
  function automatic int height(input int n, input int m);
    int h [31];
    for (int k = 0; k < 2 * n - 1; k++)
      h[k] = (k < n) ? 0 : 1 + ((h[2*(k-n)] > h[2*(k-n)+1]) ? h[2*(k-n)] : h[2*(k-n)+1]);
    return h[n + m];
  endfunction

  // Value-level run of the n-input tree; returns |decoded - ideal|.
  task automatic value_run(input int n, input int len, output real err);
    real h [N], xv [N], pm [N-1], w [2*N-1], sum_abs, ideal, est;
    int ones, ri;
    sum_abs = 0.0; ideal = 0.0;
    for (int i = 0; i < n; i++) begin
      ri = $urandom_range(0, 2000);
      h[i]  = (ri - 1000) / 1000.0;
      ri = $urandom_range(0, 2000);
      xv[i] = (ri - 1000) / 1000.0;
      sum_abs += (h[i] < 0) ? -h[i] : h[i];
      ideal += h[i] * xv[i];
      w[i] = (h[i] < 0) ? -h[i] : h[i];
    end
    ideal /= sum_abs;
    for (int m = 0; m < n - 1; m++) begin
      w[n + m] = w[2*m] + w[2*m + 1];
      pm[m] = (w[n + m] > 0.0) ? w[2*m + 1] / w[n + m] : 0.5;
    end
    ones = 0;
    for (int b = 0; b < len; b++) begin
      real r, rl [6];
      r = $urandom / 4294967296.0;
      for (int l = 1; l <= 5; l++) rl[l] = $urandom / 4294967296.0;
      for (int i = 0; i < n; i++) begin
        x[i] = r < (1.0 + xv[i]) / 2.0;
        sgn[i] = h[i] < 0;
      end
      for (int m = 0; m < n - 1; m++) sel[m] = rl[height(n, m)] < pm[m];
      x9 = x[8:0]; sgn9 = sgn[8:0]; sel9 = sel[7:0];
      #1;
      ones += int'((n == 16) ? z : z9);
    end
    est = 2.0 * ones / len - 1.0;
    err = (est > ideal) ? est - ideal : ideal - est;
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x = 16'($urandom); sgn = 16'($urandom); sel = 15'($urandom);
      x4 = x[3:0]; sgn4 = sgn[3:0]; sel4 = sel[2:0];
      x9 = x[8:0]; sgn9 = sgn[8:0]; sel9 = sel[7:0];
      #1;
      check(z === sop(16, x, sgn, sel), "16-input tree vs sum of products");
      check(z4 === sop(4, {12'b0, x4}, {12'b0, sgn4}, {12'b0, sel4}), "4-input tree vs sum of products");
      check(z9 === sop(9, {7'b0, x9}, {7'b0, sgn9}, {7'b0, sel9}), "9-input tree vs sum of products");
    end

    // value level
    foreach (sizes[j]) begin
      real err, tot_err;
      tot_err = 0.0;
      for (int run = 0; run < 40; run++) begin
        value_run(sizes[j], 4096, err);
        tot_err += err;
        check(err < 0.1, $sformatf("%0d-input inner product error %f", sizes[j], err));
      end
      $display("mean |error| of scaled %0d-input inner product, L=4096: %f", sizes[j], tot_err / 40);
      check(tot_err / 40 < 0.03, "mean error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
