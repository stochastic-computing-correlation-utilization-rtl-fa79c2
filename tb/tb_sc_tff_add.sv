// tb_sc_tff_add: self-checking test of the T-FF scaled adder.
// Drives random streams of random density and length (independent and
// correlated pairs). Per bit: when x = y the output must equal them; when they
// differ the output must alternate between x and y starting with x after init.
// Per stream: for correlated pairs (drawn from one random value) ones(z) must be
// (ones(x) + ones(y)) / 2 rounded up or down; for independent pairs it must lie
// within four standard deviations of it.
module tb_sc_tff_add;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0, en = 1'b0, x = 1'b0, y = 1'b0;
  logic z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_tff_add dut (.clk, .rst_n, .init, .en, .x, .y, .z);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int len, px, py, cx, cy, cz, ndiff, r;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      len = $urandom_range(1, 1024);
      px  = $urandom_range(0, 100);
      py  = $urandom_range(0, 100);
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      en = 1'b1;
      cx = 0; cy = 0; cz = 0; ndiff = 0;
      for (int b = 0; b < len; b++) begin
        r = $urandom_range(0, 99);
        x = r < px;
        y = (run % 2 == 0) ? ($urandom_range(0, 99) < py) : (r < py);
        #1;
        if (x === y) check(z === x, "equal inputs pass through");
        else begin
          check(z === ((ndiff % 2 === 0) ? x : y), "differing inputs alternate x, y");
          ndiff++;
        end
        cx += int'(x); cy += int'(y); cz += int'(z);
        @(negedge clk);
      end
      en = 1'b0;
      if (run % 2 == 1)
        check(2 * cz >= cx + cy - 1 && 2 * cz <= cx + cy + 1,
              $sformatf("correlated count z=%0d x=%0d y=%0d", cz, cx, cy));
      else
        check($itor((2 * cz - cx - cy) * (2 * cz - cx - cy)) <= 16.0 * ndiff + 1.0,
              $sformatf("independent count z=%0d x=%0d y=%0d", cz, cx, cy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
