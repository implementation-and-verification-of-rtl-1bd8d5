// Self-checking testbench for invpark.
// For random (d, q, theta) the outputs, one cycle after theta is
// applied, must match alpha = d*cos - q*sin and beta = d*sin + q*cos
// computed in real arithmetic, within 2 units. The references d = 86,
// q = 50 at theta = 0 must give alpha = 86, beta = 50.
module tb_invpark;
  logic clk = 0, reset = 1;
  logic signed [31:0] d, q, theta, alpha, beta;
  int checks = 0, failures = 0;

  invpark dut (.clk, .reset, .d, .q, .theta, .alpha, .beta);

  always #5 clk = ~clk;

  task automatic check(input int vd, input int vq, input int th);
    real r, ea, eb;
    @(negedge clk); d = vd; q = vq; theta = th;
    @(posedge clk); #1;
    r = 3.14159265358979 * th / 180.0;
    ea = vd * $cos(r) - vq * $sin(r);
    eb = vd * $sin(r) + vq * $cos(r);
    checks += 2;
    if (((real'(alpha) - ea) > 2.0 || (ea - real'(alpha)) > 2.0)) begin failures++; $display("FAIL alpha %0d exp %f (d=%0d q=%0d t=%0d)", alpha, ea, vd, vq, th); end
    if (((real'(beta) - eb) > 2.0 || (eb - real'(beta)) > 2.0)) begin failures++; $display("FAIL beta %0d exp %f (d=%0d q=%0d t=%0d)", beta, eb, vd, vq, th); end
  endtask

  initial begin
    d = 0; q = 0; theta = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    check(86, 50, 0);
    checks += 2;
    if (alpha != 86) begin failures++; $display("FAIL alpha(0) = %0d", alpha); end
    if (beta != 50) begin failures++; $display("FAIL beta(0) = %0d", beta); end
    for (int i = 0; i < 3000; i++)
      check(int'($urandom_range(40000)) - 20000, int'($urandom_range(40000)) - 20000, int'($urandom_range(359)));
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
