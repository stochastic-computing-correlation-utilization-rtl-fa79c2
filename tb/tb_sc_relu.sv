// tb_sc_relu: self-checking test of the stochastic ReLU.
// The input stream is generated in the testbench from the same random value the
// ReLU receives (bit = rnd < (1 + x) / 2 * 2^32). Each output bit must equal the
// bit of a stream of max(x, 0), and the decoded count over 1024 bits must match
// max(x, 0) exactly as that reference stream does.
module tb_sc_relu;
  logic        x;
  logic [31:0] rnd;
  logic        z;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  sc_relu dut (.x, .rnd, .z);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint thr, thr_relu;
    int c, e;
    for (int run = 0; run < 200; run++) begin
      logic signed [31:0] v;
      v = $urandom;
      thr = longint'(v) + 64'sd2147483648;
      thr_relu = (thr > 64'sd2147483648) ? thr : 64'sd2147483648;
      if (v < 0) n_neg++; else n_pos++;
      c = 0; e = 0;
      for (int b = 0; b < 1024; b++) begin
        rnd = $urandom;
        x = longint'(rnd) < thr;
        #1;
        check(z === (longint'(rnd) < thr_relu), "bit equals max(x,0) stream");
        c += int'(z); e += int'(longint'(rnd) < thr_relu);
      end
      check(c === e, "count");
    end
    check(n_neg > 0 && n_pos > 0, "both signs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
