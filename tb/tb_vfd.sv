// Self-checking testbench for vfd at its default parameters (100 MHz clock,
// MAX_FREQ 50, 3 us dead time).
// 1. Sixty one-cycle presses of 'up' (as in the reference verification)
//    must stop at 50 Hz: display "50", all LEDs on.
// 2. At 50 Hz the sync output must have a period of 1024*(98000/50+2) =
//    2,009,088 cycles. Over one period phase 1's PWM must be high about
//    half the time, mostly high while its sine is positive (first half of
//    the period) and mostly low in the second half; phases 2 and 3 must be
//    mostly high 240 and 120 degrees later (their positive half-waves).
// 3. Twenty-five presses of 'down' give 25 Hz: period 1024*(3920+2) cycles
//    and half the amplitude, so less PWM asymmetry than at 50 Hz.
// 4. Down to 0 Hz: drive disabled, all gates off.
// Throughout, vfd_monitor checks short circuits and dead times.
module tb_vfd;
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

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic press(ref logic b, input int n);
    repeat (n) begin
      @(negedge clk); b = 1; @(negedge clk); b = 0;
      repeat (20) @(negedge clk);
    end
  endtask

  longint period, hi_cnt [3], pos_hi [3], neg_hi [3];
  task automatic run_period(input longint exp_period, output longint got);
    longint n;
    logic prev;
    foreach (hi_cnt[p]) begin hi_cnt[p] = 0; pos_hi[p] = 0; neg_hi[p] = 0; end
    // sync falls when the phase-1 address wraps to 0 (sine at 0 degrees)
    @(negedge sync);
    n = 0;
    prev = 1'b0;
    forever begin
      int deg;
      @(posedge clk);
      if (prev && !sync) break;
      prev = sync;
      deg = int'(n * 360 / exp_period);
      // phase 1 sine > 0 for 0..180, phase 2 (+240) for 120..300, phase 3 (+120) for 240..360, 0..60
      if (ph1) begin hi_cnt[0]++; if (deg >= 20 && deg < 160) pos_hi[0]++; if (deg >= 200 && deg < 340) neg_hi[0]++; end
      if (ph2) begin hi_cnt[1]++; if (deg >= 140 && deg < 280) pos_hi[1]++; if (deg >= 320 || deg < 100) neg_hi[1]++; end
      if (ph3) begin hi_cnt[2]++; if (deg >= 260 || deg < 40) pos_hi[2]++; if (deg >= 80 && deg < 220) neg_hi[2]++; end
      n++;
      if (n > 3 * exp_period) break;
    end
    got = n;
  endtask

  initial begin
    longint exp_p;
    repeat (5) @(negedge clk);
    expect_true(reset_out == 1'b1, "reset_out follows reset");
    expect_true(s == 6'b000000, "gates off in reset");
    reset = 0;
    @(negedge clk);
    expect_true(reset_out == 1'b0, "reset_out released");
    expect_true(enable_led == 16'h0000, "LEDs off at 0 Hz");
    press(up, 60);
    expect_true(dut.u_freq.current_freq == 7'd50, "up presses stop at 50 Hz");
    expect_true(enable_led == 16'hFFFF, "LEDs on while running");
    // 50 Hz
    exp_p = 1024 * (98000 / 50 + 2);
    run_period(exp_p, period);
    $display("50 Hz: period %0d cycles (expected %0d), phase highs %0d %0d %0d", period, exp_p, hi_cnt[0], hi_cnt[1], hi_cnt[2]);
    expect_true(period == exp_p, "sync period at 50 Hz");
    for (int p = 0; p < 3; p++) begin
      expect_true(hi_cnt[p] > exp_p * 45 / 100 && hi_cnt[p] < exp_p * 55 / 100, $sformatf("phase %0d duty near 50%%", p + 1));
      expect_true(pos_hi[p] > (exp_p * 140 / 360) * 75 / 100, $sformatf("phase %0d high in its positive half-wave (%0d)", p + 1, pos_hi[p]));
      expect_true(neg_hi[p] < (exp_p * 140 / 360) * 25 / 100, $sformatf("phase %0d low in its negative half-wave (%0d)", p + 1, neg_hi[p]));
    end
    expect_true(mon.units == 0 && mon.tens == 5, $sformatf("display shows 50 (%0d %0d)", mon.tens, mon.units));
    // 25 Hz, factor 50
    press(down, 25);
    expect_true(dut.u_freq.current_freq == 7'd25, "down presses reach 25 Hz");
    exp_p = 1024 * (98000 / 25 + 2);
    run_period(exp_p, period);
    $display("25 Hz: period %0d cycles (expected %0d), phase-1 positive-half high %0d", period, exp_p, pos_hi[0]);
    expect_true(period == exp_p, "sync period at 25 Hz");
    expect_true(pos_hi[0] < (exp_p * 140 / 360) * 85 / 100 && pos_hi[0] > (exp_p * 140 / 360) * 55 / 100,
                "half amplitude at 25 Hz");
    expect_true(mon.units == 5 && mon.tens == 2, "display shows 25");
    // stop
    press(down, 30);
    repeat (400) @(negedge clk);
    expect_true(s == 6'b000000 && enable_led == 16'h0000, "all gates off at 0 Hz");
    expect_true(mon.dead_times > 200, $sformatf("dead times inserted (%0d)", mon.dead_times));
    $display("dead times %0d, monitor checks %0d", mon.dead_times, mon.checks);
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures);
    $finish;
  end
endmodule
