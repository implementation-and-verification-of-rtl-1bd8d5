// Self-checking testbench for sawtooth_gen.
// With one tick every few cycles the output must step -32768, -30720, ...,
// 30720, then wrap to -32768 one tick later (33 ticks per tooth). Checks the
// value after every tick against the expected sequence, the hold between
// ticks, the hold while disabled and the tooth length in ticks.
module tb_sawtooth_gen;
  logic clk = 0, reset = 1, enable = 0, tick = 0;
  logic signed [15:0] sawtooth_wave;
  int checks = 0, failures = 0;
  int k;  // expected step index within a tooth

  sawtooth_gen dut (.clk, .reset, .enable, .tick, .sawtooth_wave);

  always #5 clk = ~clk;

  task automatic expect_val(input int v, input string what);
    checks++;
    if (int'(sawtooth_wave) != v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, sawtooth_wave, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    #1 expect_val(-32768, "reset");
    enable = 1;
    k = 0;
    for (int t = 0; t < 33 * 4; t++) begin
      @(negedge clk); tick = 1;
      @(negedge clk); tick = 0;
      k = (k + 1) % 33;
      // step 32 reaches +32768, shown as -32768, and wraps on the next cycle
      expect_val(k == 32 ? -32768 : -32768 + 2048 * k, "after tick");
      repeat (int'($urandom_range(4, 2))) @(negedge clk);
      if (k == 32) k = 0;  // the wrap happened without a tick
      expect_val(-32768 + 2048 * k, "between ticks");
    end
    // disabled: ticks are ignored
    enable = 0;
    repeat (5) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
    expect_val(-32768 + 2048 * k, "disabled");
    reset = 1; @(negedge clk); reset = 0;
    expect_val(-32768, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
