// Self-checking testbench for btn_pulse.
// Presses of 1, 2, 7 and 300 cycles, and random presses, must each give
// exactly one one-cycle pulse, three cycles after the press starts.
module tb_btn_pulse;
  logic clk = 0, reset = 1, btn = 0, pulse;
  int checks = 0, failures = 0;
  int pulses = 0, cyc = 0, press_cyc = -1, lat_fail = 0;

  btn_pulse dut (.clk, .reset, .btn, .pulse);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (pulse) begin
      pulses++;
      if (press_cyc >= 0 && cyc - press_cyc != 3) lat_fail++;
    end
  end

  task automatic press(input int len, input int gap);
    int n0;
    n0 = pulses;
    @(negedge clk); btn = 1; press_cyc = cyc + 1;
    repeat (len) @(negedge clk);
    btn = 0;
    repeat (gap) @(negedge clk);
    checks++;
    if (pulses != n0 + 1) begin
      failures++; $display("FAIL press len %0d gave %0d pulses", len, pulses - n0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (3) @(posedge clk);
    checks++; if (pulses != 0) failures++;
    press(1, 6); press(2, 6); press(7, 6); press(300, 6);
    for (int i = 0; i < 50; i++) press(int'($urandom_range(40, 1)), int'($urandom_range(20, 5)));
    checks++;
    if (lat_fail != 0) begin failures++; $display("FAIL latency %0d times", lat_fail); end
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
