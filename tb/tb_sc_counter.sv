// tb_sc_counter: self-checking test of the stochastic-to-binary counter.
// Random bits, random enable and occasional clears against a reference count;
// also a full 8192-bit all-ones stream (the longest SN length).
module tb_sc_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0, sn = 1'b0;
  logic [13:0] count;
  int ref_count = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_counter dut (.clk, .rst_n, .clear, .en, .sn, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count === 0, "zero after reset");
    for (int t = 0; t < 6000; t++) begin
      clear = ($urandom_range(0, 999) == 0);
      en    = $urandom_range(0, 3) != 0;
      sn    = $urandom_range(0, 1);
      @(negedge clk);
      if (clear) ref_count = 0;
      else if (en && sn) ref_count++;
      check(int'(count) === ref_count, $sformatf("count %0d vs %0d", count, ref_count));
    end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    en = 1'b1;
    sn = 1'b1;
    repeat (8192) @(negedge clk);
    en = 1'b0;
    check(count === 14'd8192, "8192 ones counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
