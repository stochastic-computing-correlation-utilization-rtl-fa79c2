// tb_sc_lfsr: self-checking test of the shared LFSR.
// Checks, for 8- and 16-bit registers, that the sequence visits every non-zero
// value exactly once per period (2^W - 1 clocks, so the polynomial is maximal
// length), and for the default 32-bit register that it follows the recurrence
// new_bit = s[31] ^ s[21] ^ s[1] ^ s[0], holds when disabled and reloads its seed.
module tb_sc_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0;
  logic en = 1'b0;
  logic [7:0]  r8;
  logic [15:0] r16;
  logic [31:0] r32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_lfsr #(.WIDTH(8),  .SEED(8'h5A))    u8  (.clk, .rst_n, .init, .en, .rnd(r8));
  sc_lfsr #(.WIDTH(16), .SEED(16'hACE1)) u16 (.clk, .rst_n, .init, .en, .rnd(r16));
  sc_lfsr                                u32 (.clk, .rst_n, .init, .en, .rnd(r32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit seen8 [256];
  bit seen16 [65536];
  logic [31:0] model;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(r8 === 8'h5A && r16 === 16'hACE1 && r32 === 32'h7F4A_7C15, "seed after reset");
    model = 32'h7F4A_7C15;
    en = 1'b1;
    for (int t = 0; t < 65535; t++) begin
      if (t < 255) begin
        check(r8 != 0 && !seen8[r8], $sformatf("8-bit repeat/zero at step %0d", t));
        seen8[r8] = 1'b1;
      end else if (t == 255) begin
        check(r8 === 8'h5A, "8-bit period is 255");
      end
      check(!seen16[r16] && r16 != 0, $sformatf("16-bit repeat/zero at step %0d", t));
      seen16[r16] = 1'b1;
      if (t < 2000) check(r32 === model, $sformatf("32-bit recurrence step %0d", t));
      repeat (32) model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      @(negedge clk);
    end
    check(r16 === 16'hACE1, "16-bit period is 65535");
    // hold
    en = 1'b0;
    model = r32;
    repeat (3) @(negedge clk);
    check(r32 === model, "holds while en = 0");
    // reseed wins over en
    en = 1'b1;
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    check(r32 === 32'h7F4A_7C15 && r8 === 8'h5A, "init reloads seed");
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
