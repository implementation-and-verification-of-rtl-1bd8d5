// Workload testbench: the scalar drive's reference verification run.
// vfd at its default parameters; 10 ms after reset the 'up' button is
// pressed 60 times, each press 10 ns (one clock cycle) followed by 5 ms,
// about 310 ms of simulated time in all. After every press the set
// frequency must be min(press count, 50) and the display must show it; at
// the end one full sine period is measured on 'sync' and must last
// 1024*(98000/50+2) cycles. Short circuits and dead times are checked
// throughout by vfd_monitor.
module tb_vfd_ramp;
  logic clk = 0, reset = 1, up = 0, down = 0;
  logic reset_out, ph1, ph2, ph3, sync;
  logic [1:6] s;
  logic [15:0] enable_led;
  logic [7:0] cat;
  logic [3:0] an;
  int checks = 0, failures = 0;

  vfd dut (.clk, .reset, .down, .up, .reset_out, .pwm_wave_ph1_out(ph1), .pwm_wave_ph2_out(ph2),
           .pwm_wave_ph3_out(ph3), .sync, .s, .enable_led, .cat, .an);
  vfd_monitor #(.DEAD(300)) mon (.clk, .active(!reset), .s, .cat, .an);

  always #5 clk = ~clk;

  initial begin
    longint n;
    logic prev;
    int f;
    repeat (3) @(negedge clk);
    reset = 0;
    #10ms;
    for (int i = 1; i <= 60; i++) begin
      up = 1; #10ns;
      up = 0; #5ms;
      f = (i < 50) ? i : 50;
      checks += 2;
      if (int'(dut.u_freq.current_freq) != f) begin failures++; $display("FAIL press %0d: %0d Hz", i, dut.u_freq.current_freq); end
      if (mon.units != f % 10 || mon.tens != (f < 10 ? -1 : f / 10)) begin
        failures++; $display("FAIL press %0d: display %0d %0d", i, mon.tens, mon.units);
      end
    end
    $display("set frequency after 60 presses: %0d Hz", dut.u_freq.current_freq);
    @(negedge sync);
    n = 0;
    prev = 1'b0;
    forever begin
      @(posedge clk);
      if (prev && !sync) break;
      prev = sync;
      n++;
    end
    checks++;
    if (n != 1024 * (98000 / 50 + 2)) begin failures++; $display("FAIL period %0d", n); end
    $display("sine period %0d cycles = %0d us; dead times %0d", n, n / 100, mon.dead_times);
    checks++;
    if (mon.dead_times < 1000) begin failures++; $display("FAIL few dead times"); end
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures);
    $finish;
  end
endmodule
