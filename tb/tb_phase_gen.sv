// Self-checking testbench for phase_gen (DEAD_CYCLES = 300, 3 us at 100 MHz).
// Drives random PWM levels with runs from 1 to 1000 cycles. Checks every
// cycle that the two outputs are never on together, that every turn-on
// follows at least 300 cycles with both off, and that after a stable input
// lasting longer than the dead time the selected side is on. Counts how
// often a full dead time was inserted and how often a short pulse was
// swallowed.
module tb_phase_gen;
  localparam int DEAD = 300;
  logic clk = 0, reset = 1, enable = 0, pwm_in = 0, pwm_h, pwm_l;
  int checks = 0, failures = 0;
  int off_run = 0, stable = 0, dead_inserted = 0;

  phase_gen dut (.clk, .reset, .enable, .pwm_in, .pwm_h, .pwm_l);

  always #5 clk = ~clk;

  // input stability count, seen by the outputs one cycle later
  always @(posedge clk) begin
    #1;
    checks++;
    if (pwm_h && pwm_l) begin failures++; $display("FAIL both on"); end
    if (pwm_h || pwm_l) begin
      if (off_run > 0) begin
        checks++;
        if (off_run < DEAD) begin failures++; $display("FAIL dead time %0d", off_run); end
        else dead_inserted++;
      end
      off_run = 0;
    end else off_run++;
    if (enable && !reset && stable > DEAD + 1) begin
      checks++;
      if (pwm_h != pwm_in || pwm_l != !pwm_in) begin
        failures++; $display("FAIL level after %0d stable cycles", stable);
      end
    end
  end

  always @(negedge clk) stable++;

  task automatic drive(input bit v, input int len);
    if (v != pwm_in) stable = 0;
    pwm_in = v;
    repeat (len) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    drive(1, 20);
    checks++; if (pwm_h || pwm_l) begin failures++; $display("FAIL on while disabled"); end
    enable = 1; stable = 0;
    drive(1, 400); drive(0, 400); drive(1, 400);
    for (int i = 0; i < 200; i++) drive(~pwm_in, int'($urandom_range(1000, 1)));
    enable = 0;
    drive(pwm_in, 3);
    checks++; if (pwm_h || pwm_l) begin failures++; $display("FAIL on after disable"); end
    checks++; if (dead_inserted < 10) begin failures++; $display("FAIL too few dead times %0d", dead_inserted); end
    $display("dead times inserted: %0d", dead_inserted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
