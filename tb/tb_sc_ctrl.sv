// tb_sc_ctrl: self-checking test of the evaluation sequencer.
// For random lengths (and the edge cases 1, 0 and 8192) checks that init is high
// for exactly one clock, en for exactly L clocks right after it, done for one
// clock L + 2 clocks after start, busy throughout, and that start is ignored
// while busy.
module tb_sc_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [13:0] len = '0;
  logic init, en, done, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_ctrl dut (.clk, .rst_n, .start, .len, .init, .en, .done, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int L, n_init, n_en, lat, expect_len;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !en && !init && !done, "idle after reset");
    for (int run = 0; run < 40; run++) begin
      L = (run == 0) ? 1 : (run == 1) ? 0 : (run == 2) ? 8192 : $urandom_range(1, 3000);
      expect_len = (L == 0) ? 1 : L;
      len = 14'(L);
      start = 1'b1;
      @(negedge clk);
      start = (run % 3 == 0);      // held start must not restart a busy run
      len = 14'($urandom);
      n_init = 0; n_en = 0; lat = 1;
      while (!done) begin
        check(busy, "busy while running");
        if (init) begin
          n_init++;
          check(n_en === 0, "init before en");
        end
        if (en) n_en++;
        @(negedge clk);
        lat++;
        if (lat > 10000) break;
      end
      start = 1'b0;
      check(n_init === 1, "one init cycle");
      check(n_en === expect_len, $sformatf("en for L=%0d cycles, got %0d", expect_len, n_en));
      check(lat === expect_len + 2, $sformatf("done after L+2 = %0d, got %0d", expect_len + 2, lat));
      @(negedge clk);
      check(!done && !busy, "done lasts one clock");
    end
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
