// End-to-end testbench of motor_ctrl_top at its default parameters.
// Scalar drive: start from 0 Hz, sixty 'up' presses (stops at 50 Hz), one
// full 50 Hz sine period, then 25 'down' presses and one full 25 Hz period,
// then down to 0 Hz. Checks the sync period (1024*(98000/f+2) cycles), the
// display, the LEDs, and through vfd_monitor short circuits and dead times.
// FOC, running at the same time: theta advances one degree every 102
// cycles with balanced currents of amplitude 100 and v_d = 86, v_q = 50;
// checks i_d = 0, i_q = -100 (within 2) and that the six gates are
// complementary pairs.
// Each mechanism of the design is counted and must occur at least once:
// frequency limit reached, drive start (enable pulse), end-count change,
// V/Hz factor below 100, factor at 100, sawtooth wrap, sine address wrap,
// dead time inserted, every SVPWM sector, both switching vectors applied.
module tb_motor_ctrl_top;
  logic clk = 0, reset = 1, up = 0, down = 0;
  logic reset_out, sync;
  logic [2:0] pwm;
  logic [1:6] vfd_s, foc_s;
  logic [15:0] enable_led;
  logic [7:0] cat;
  logic [3:0] an;
  logic signed [31:0] i_a = 0, i_b = 0, i_c = 0, theta = 0, alpha_o, beta_o, i_d, i_q;
  int checks = 0, failures = 0;

  motor_ctrl_top dut (
    .clk, .reset, .vfd_up(up), .vfd_down(down), .vfd_reset_out(reset_out), .vfd_pwm_wave_out(pwm),
    .vfd_sync(sync), .vfd_s, .vfd_enable_led(enable_led), .vfd_cat(cat), .vfd_an(an),
    .foc_i_a(i_a), .foc_i_b(i_b), .foc_i_c(i_c), .foc_theta(theta), .foc_v_d_ref(32'sd86),
    .foc_v_q_ref(32'sd50), .foc_s, .foc_i_alpha(alpha_o), .foc_i_beta(beta_o), .foc_i_d(i_d), .foc_i_q(i_q));

  vfd_monitor #(.DEAD(300)) mon (.clk, .active(!reset), .s(vfd_s), .cat, .an);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  typedef enum int {M_LIMIT, M_START, M_EOC_CHANGE, M_FACTOR_LT100, M_FACTOR_100, M_SAW_WRAP,
                    M_ADDR_WRAP, M_DEAD_TIME, M_SEC1, M_SEC2, M_SEC3, M_SEC4, M_SEC5, M_SEC6,
                    M_VEC_H, M_VEC_L, M_COUNT} mech_t;
  int mech [M_COUNT];
  logic [31:0] last_eoc;
  logic [15:0] last_saw;
  logic [9:0]  last_addr;
  initial foreach (mech[i]) mech[i] = 0;

  always @(posedge clk) if (!reset) begin
    if (dut.u_vfd.up_pulse && dut.u_vfd.current_freq == 7'd50) mech[M_LIMIT]++;
    if (dut.u_vfd.enable_pulse) mech[M_START]++;
    if (dut.u_vfd.eoc != last_eoc) mech[M_EOC_CHANGE]++;
    if (dut.u_vfd.enable && dut.u_vfd.factor < 7'd100) mech[M_FACTOR_LT100]++;
    if (dut.u_vfd.factor == 7'd100) mech[M_FACTOR_100]++;
    if ($signed(dut.u_vfd.sawtooth_wave) < $signed(last_saw) && dut.u_vfd.enable) mech[M_SAW_WRAP]++;
    if (dut.u_vfd.address_ph1 == 10'd0 && last_addr == 10'd1023) mech[M_ADDR_WRAP]++;
    case (dut.u_foc.inst_svpwm.sector)
      3'd1: mech[M_SEC1]++; 3'd2: mech[M_SEC2]++; 3'd3: mech[M_SEC3]++;
      3'd4: mech[M_SEC4]++; 3'd5: mech[M_SEC5]++; 3'd6: mech[M_SEC6]++;
      default: ;
    endcase
    if (dut.u_foc.inst_svpwm.half_sel) mech[M_VEC_L]++; else mech[M_VEC_H]++;
    last_eoc  <= dut.u_vfd.eoc;
    last_saw  <= dut.u_vfd.sawtooth_wave;
    last_addr <= dut.u_vfd.address_ph1;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- FOC stimulus and checks ----------------
  localparam real PI = 3.14159265358979;
  function automatic int rnd(input real x);
    return $rtoi(x >= 0 ? $floor(x + 0.5) : -$floor(-x + 0.5));
  endfunction

  bit foc_run = 0;
  initial begin
    @(negedge clk);
    wait (!reset);
    forever begin
      for (int th = 0; th < 360 && foc_run; th++) begin
        real r;
        r = PI * th / 180.0;
        theta = th;
        i_a = rnd(100.0 * $sin(r));
        i_b = rnd(100.0 * $sin(r + 4.0 * PI / 3.0));
        i_c = rnd(100.0 * $sin(r + 2.0 * PI / 3.0));
        repeat (3) @(negedge clk);
        checks += 3;
        if (i_d > 2 || i_d < -2) begin failures++; $display("FAIL i_d %0d at %0d", i_d, th); end
        if (i_q > -98 || i_q < -102) begin failures++; $display("FAIL i_q %0d at %0d", i_q, th); end
        if (foc_s[4] != !foc_s[1] || foc_s[6] != !foc_s[3] || foc_s[2] != !foc_s[5]) begin
          failures++; $display("FAIL FOC gates not complementary");
        end
        repeat (99) @(negedge clk);
      end
      if (!foc_run) @(negedge clk);
    end
  end

  // ---------------- scalar drive sequence ----------------
  task automatic press(ref logic b, input int n);
    repeat (n) begin
      @(negedge clk); b = 1; @(negedge clk); b = 0;
      repeat (20) @(negedge clk);
    end
  endtask

  task automatic sync_period(output longint n);
    logic prev;
    @(negedge sync);
    n = 0;
    prev = 1'b0;
    forever begin
      @(posedge clk);
      if (prev && !sync) break;
      prev = sync;
      n++;
      if (n > 20_000_000) break;
    end
  endtask

  initial begin
    longint p;
    repeat (5) @(negedge clk);
    expect_true(reset_out && vfd_s == 6'b000000, "reset state");
    reset = 0;
    foc_run = 1;
    press(up, 60);
    expect_true(enable_led == 16'hFFFF, "running LEDs");
    sync_period(p);
    $display("50 Hz sine period: %0d cycles", p);
    expect_true(p == 1024 * (98000 / 50 + 2), "50 Hz period");
    expect_true(mon.tens == 5 && mon.units == 0, "display 50");
    press(down, 25);
    sync_period(p);
    $display("25 Hz sine period: %0d cycles", p);
    expect_true(p == 1024 * (98000 / 25 + 2), "25 Hz period");
    expect_true(mon.tens == 2 && mon.units == 5, "display 25");
    press(down, 30);
    repeat (400) @(negedge clk);
    expect_true(vfd_s == 6'b000000 && enable_led == 16'h0000 && pwm == 3'b000, "stopped at 0 Hz");
    mech[M_DEAD_TIME] = mon.dead_times;
    for (int i = 0; i < int'(M_COUNT); i++) begin
      mech_t m;
      m = mech_t'(i);
      $display("mechanism %-16s %0d", m.name(), mech[i]);
      expect_true(mech[i] > 0, $sformatf("mechanism %s happened", m.name()));
    end
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures);
    $finish;
  end
endmodule
