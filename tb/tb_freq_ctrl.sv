// Self-checking testbench for freq_ctrl (MAX_FREQ = 50).
// Sixty up pulses must stop the frequency at 50, as in the reference
// verification; then down pulses back to 0 and random sequences. After
// every pulse the frequency is compared with a counter kept here, and the
// factor, end count and enable outputs with values computed from it:
// factor = min(100, 2*f), eoc = 98000/f (98000 at 0), enable = f > 0,
// one enable pulse per start from 0.
module tb_freq_ctrl;
  logic clk = 0, reset = 1, up_pulse = 0, down_pulse = 0;
  logic [6:0] current_freq, factor;
  logic [31:0] eoc;
  logic enable, enable_pulse;
  int checks = 0, failures = 0, model = 0, starts = 0, pulses_seen = 0;

  freq_ctrl dut (.clk, .reset, .up_pulse, .down_pulse, .current_freq, .factor, .eoc, .enable, .enable_pulse);

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset && enable_pulse) pulses_seen++;

  task automatic check_all();
    int ef, ee;
    repeat (2) @(posedge clk);
    #1;
    ef = (model * 100 / 50 > 100) ? 100 : model * 100 / 50;
    ee = (model > 0) ? 98000 / model : 98000;
    checks += 4;
    if (int'(current_freq) != model) begin failures++; $display("FAIL freq %0d exp %0d at %0t", current_freq, model, $time); end
    if (int'(factor) != ef) begin failures++; $display("FAIL factor %0d exp %0d", factor, ef); end
    if (int'(eoc) != ee) begin failures++; $display("FAIL eoc %0d exp %0d", eoc, ee); end
    if (enable != (model > 0)) begin failures++; $display("FAIL enable"); end
  endtask

  task automatic pulse(input bit up, input bit dn);
    @(negedge clk); up_pulse = up; down_pulse = dn;
    @(negedge clk); up_pulse = 0; down_pulse = 0;
    if (up && model < 50) begin
      if (model == 0) starts++;
      model++;
    end else if (dn && model > 0) model--;  // up at the limit lets down act
    check_all();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    check_all();
    for (int i = 0; i < 60; i++) pulse(1, 0);
    checks++; if (current_freq != 7'd50) begin failures++; $display("FAIL saturation"); end
    for (int i = 0; i < 55; i++) pulse(0, 1);
    pulse(1, 1);   // up wins
    for (int i = 0; i < 400; i++) pulse(1'($urandom_range(1)), 1'($urandom_range(1)));
    checks++;
    if (pulses_seen != starts) begin failures++; $display("FAIL enable pulses %0d exp %0d", pulses_seen, starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
