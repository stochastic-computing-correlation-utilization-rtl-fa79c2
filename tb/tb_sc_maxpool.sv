// tb_sc_maxpool: self-checking test of OR-tree max pooling.
// Inputs are drawn as fully correlated streams, bit_i = (r < p_i) with one r per
// clock shared by all inputs. Each output bit must then equal (r < max p_i), and
// the output count must equal that of a stream of the maximum. Runs the 2x2
// window (4 inputs), a 3x3 window (9 inputs) and a 16-input tree.
module tb_sc_maxpool;
  logic [3:0]  x4;
  logic        z4;
  logic [15:0] x16;
  logic        z16;
  logic [8:0]  x9;
  logic        z9;
  int checks = 0, failures = 0;

  sc_maxpool                u4  (.x(x4), .z(z4));
  sc_maxpool #(.N_IN(16))   u16 (.x(x16), .z(z16));
  sc_maxpool #(.N_IN(9))    u9  (.x(x9), .z(z9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned p [16];
    int unsigned pmax4, pmax9, pmax16, r;
    int c4, e4, c16, e16;
    for (int run = 0; run < 100; run++) begin
      pmax4 = 0; pmax9 = 0; pmax16 = 0;
      for (int i = 0; i < 16; i++) begin
        p[i] = $urandom_range(0, 65536);
        if (i < 4 && p[i] > pmax4) pmax4 = p[i];
        if (i < 9 && p[i] > pmax9) pmax9 = p[i];
        if (p[i] > pmax16) pmax16 = p[i];
      end
      c4 = 0; e4 = 0; c16 = 0; e16 = 0;
      for (int b = 0; b < 512; b++) begin
        r = $urandom_range(0, 65535);
        for (int i = 0; i < 16; i++) x16[i] = r < p[i];
        x4 = x16[3:0];
        x9 = x16[8:0];
        #1;
        check(z4 === (r < pmax4), "4-input bit is the max stream");
        check(z16 === (r < pmax16), "16-input bit is the max stream");
        check(z9 === (r < pmax9), "9-input bit is the max stream");
        c4 += int'(z4); e4 += int'(r < pmax4);
        c16 += int'(z16); e16 += int'(r < pmax16);
      end
      check(c4 === e4 && c16 === e16, "counts equal the max stream");
    end
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
