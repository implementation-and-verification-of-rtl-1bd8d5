// Self-checking testbench for sine_addr_gen.
// Checks the start phases 0/682/341, that the three addresses advance
// together only on enabled ticks, wrap at 1024, keep their 682/341 spacing,
// and reload on the enable pulse.
module tb_sine_addr_gen;
  logic clk = 0, reset = 1, enable = 0, enable_pulse = 0, tick = 0;
  logic [9:0] a1, a2, a3;
  int checks = 0, failures = 0, n = 0;

  sine_addr_gen dut (.clk, .reset, .enable, .enable_pulse, .tick,
                     .address_ph1(a1), .address_ph2(a2), .address_ph3(a3));

  always #5 clk = ~clk;

  task automatic expect_n(input int cnt);
    checks++;
    if (int'(a1) != cnt % 1024 || int'(a2) != (682 + cnt) % 1024 || int'(a3) != (341 + cnt) % 1024) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d got %0d %0d %0d", cnt, a1, a2, a3);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    expect_n(0);
    tick = 1; @(negedge clk); tick = 0;
    expect_n(0);                       // not enabled
    enable = 1;
    for (int i = 0; i < 2100; i++) begin
      tick = 1'($urandom_range(1));
      @(negedge clk);
      if (tick) n++;
      expect_n(n);
    end
    tick = 0;
    enable_pulse = 1; @(negedge clk); enable_pulse = 0;
    expect_n(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
