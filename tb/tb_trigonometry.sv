// Self-checking testbench for trigonometry.
// For all 360 degrees (in order and in random order) the registered sin and
// cos, one cycle after the address, must equal 16384*sin and 16384*cos of
// the angle computed here with real arithmetic, within one LSB.
module tb_trigonometry;
  logic clk = 0, reset = 1;
  logic [8:0] address;
  logic signed [15:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  trigonometry dut (.clk, .reset, .address, .sin(sin_o), .cos(cos_o));

  always #5 clk = ~clk;

  task automatic check_deg(input int deg);
    real r;
    int es, ec;
    @(negedge clk); address = 9'(deg);
    @(posedge clk); #1;
    r = 3.14159265358979 * deg / 180.0;
    es = $rtoi($floor(16384.0 * $sin(r) + 0.5));
    ec = $rtoi($floor(16384.0 * $cos(r) + 0.5));
    checks += 2;
    if (int'(sin_o) - es > 1 || es - int'(sin_o) > 1) begin failures++; $display("FAIL sin(%0d) %0d exp %0d", deg, sin_o, es); end
    if (int'(cos_o) - ec > 1 || ec - int'(cos_o) > 1) begin failures++; $display("FAIL cos(%0d) %0d exp %0d", deg, cos_o, ec); end
  endtask

  initial begin
    address = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int d = 0; d < 360; d++) check_deg(d);
    for (int i = 0; i < 500; i++) check_deg(int'($urandom_range(359)));
    check_deg(90);
    checks++; if (sin_o != 16'sd16384 || cos_o != 16'sd0) begin failures++; $display("FAIL at 90"); end
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
