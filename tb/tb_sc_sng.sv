// tb_sc_sng: self-checking test of the comparator SNG.
// Bit level: random operands and random values, bipolar and unipolar,
// compared with the threshold worked out in integer arithmetic.
// Stream level: an 8-bit SNG swept over a full LFSR period (every value 1..255
// once) must produce exactly threshold - 1 ones.
module tb_sc_sng;
  logic [31:0] v32, r32;
  logic        bp32, up32;
  logic [7:0]  v8, r8;
  logic        bp8;
  int checks = 0, failures = 0;

  sc_sng                                  u_bp  (.value(v32), .rnd(r32), .sn(bp32));
  sc_sng #(.BIPOLAR(1'b0))                u_up  (.value(v32), .rnd(r32), .sn(up32));
  sc_sng #(.WIDTH(8), .BIPOLAR(1'b1))     u_bp8 (.value(v8),  .rnd(r8),  .sn(bp8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint thr;
    int ones;
    for (int t = 0; t < 20000; t++) begin
      v32 = $urandom;
      r32 = (t % 7 == 0) ? v32 ^ 32'h8000_0000 : $urandom;  // hit the boundary too
      #1;
      thr = longint'($signed(v32)) + 64'sd2147483648;        // (1 + x) / 2 * 2^32
      check(bp32 === (longint'(r32) < thr), $sformatf("bipolar v=%h r=%h", v32, r32));
      check(up32 === (longint'(r32) < longint'(v32)), $sformatf("unipolar v=%h r=%h", v32, r32));
    end
    // stream level: x = -1 .. almost +1 over one full 8-bit period
    for (int v = -128; v < 128; v += 5) begin
      v8 = 8'(v);
      ones = 0;
      for (int r = 1; r < 256; r++) begin
        r8 = 8'(r);
        #1;
        ones += int'(bp8);
      end
      // threshold = v + 128; values 1..255 below it: max(thr - 1, 0)
      check(ones === ((v + 128 > 0) ? v + 127 : 0), $sformatf("stream v=%0d ones=%0d", v, ones));
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
