// Self-checking testbench for clock_divider.
// For several end counts, measures the distance between clk_div pulses,
// which must be eoc+2 cycles, and checks that each pulse lasts one cycle.
module tb_clock_divider;
  logic clk = 0, reset = 1;
  logic [31:0] eoc;
  logic clk_div;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .reset, .eoc, .clk_div);

  always #5 clk = ~clk;

  task automatic measure(input int e);
    int last, cyc;
    @(negedge clk); eoc = 32'(e);
    // let a pulse pass with the new value, then measure three periods
    do @(posedge clk); while (!clk_div);
    do @(posedge clk); while (!clk_div);
    for (int k = 0; k < 3; k++) begin
      cyc = 0;
      @(posedge clk);
      checks++;
      if (clk_div) begin failures++; $display("FAIL pulse longer than one cycle"); end
      cyc = 1;
      do begin @(posedge clk); cyc++; end while (!clk_div && cyc < 200000);
      checks++;
      if (cyc != e + 2) begin failures++; $display("FAIL eoc=%0d period %0d exp %0d", e, cyc, e + 2); end
    end
  endtask

  initial begin
    eoc = 5;
    repeat (3) @(posedge clk);
    reset = 0;
    measure(0); measure(1); measure(5); measure(100); measure(1960); measure(3);
    measure(98000 / 7);
    // reset holds the output low
    reset = 1;
    repeat (10) begin @(posedge clk); #1; checks++; if (clk_div) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
