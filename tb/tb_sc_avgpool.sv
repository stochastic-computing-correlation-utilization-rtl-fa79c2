// tb_sc_avgpool: self-checking test of T-FF average pooling.
// Random streams of random density and length (independent or correlated),
// for the 2x2 window (4 inputs) and an 8-input tree. The output count must lie
// within 1 + 2 * sqrt(L) (about four standard deviations of the random part)
// of sum(ones(x_i)) / N, and for correlated inputs drawn from one random value
// the mean decoded error over the runs must stay below 0.04.
module tb_sc_avgpool;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0, en = 1'b0;
  logic [3:0] x4;
  logic [7:0] x8;
  logic z4, z8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_avgpool              u4 (.clk, .rst_n, .init, .en, .x(x4), .z(z4));
  sc_avgpool #(.N_IN(8))  u8 (.clk, .rst_n, .init, .en, .x(x8), .z(z8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int p [8];
    int len, s4, s8, c4, c8, n_corr;
    real e4, e8, corr_err;
    corr_err = 0.0;
    n_corr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      len = $urandom_range(1, 2048);
      for (int i = 0; i < 8; i++) p[i] = $urandom_range(0, 1000);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      en = 1'b1;
      s4 = 0; s8 = 0; c4 = 0; c8 = 0;
      for (int b = 0; b < len; b++) begin
        int r;
        r = $urandom_range(0, 999);
        for (int i = 0; i < 8; i++)
          x8[i] = (run % 2 == 0) ? ($urandom_range(0, 999) < p[i]) : (r < p[i]);
        x4 = x8[3:0];
        #1;
        c4 += int'(z4); c8 += int'(z8);
        for (int i = 0; i < 4; i++) s4 += int'(x4[i]);
        for (int i = 0; i < 8; i++) s8 += int'(x8[i]);
        @(negedge clk);
      end
      en = 1'b0;
      e4 = (c4 - s4 / 4.0); if (e4 < 0) e4 = -e4;
      e8 = (c8 - s8 / 8.0); if (e8 < 0) e8 = -e8;
      check(e4 <= 1.0 + 2.0 * $sqrt(len), $sformatf("4-input count %0d sum %0d", c4, s4));
      check(e8 <= 1.0 + 2.0 * $sqrt(len), $sformatf("8-input count %0d sum %0d", c8, s8));
      if (run % 2 == 1) begin
        corr_err += 2.0 * e4 / len;
        n_corr++;
      end
    end
    $display("mean decoded error, 4 correlated inputs: %f", corr_err / n_corr);
    check(corr_err / n_corr < 0.04, "mean error with correlated inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
