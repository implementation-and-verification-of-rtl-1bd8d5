// Self-checking testbench for park.
// For random (alpha, beta, theta) the outputs, one cycle after theta is
// applied, must match d = alpha*cos + beta*sin and q = -alpha*sin + beta*cos
// computed in real arithmetic, within 2 units. A balanced set of amplitude
// 100 at theta = 176 degrees must give d = 0, q = -100.
module tb_park;
  logic clk = 0, reset = 1;
  logic signed [31:0] alpha, beta, theta, d, q;
  int checks = 0, failures = 0;

  park dut (.clk, .reset, .alpha, .beta, .theta, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input int al, input int be, input int th);
    real r, ed, eq;
    @(negedge clk); alpha = al; beta = be; theta = th;
    @(posedge clk); #1;
    r = 3.14159265358979 * th / 180.0;
    ed = al * $cos(r) + be * $sin(r);
    eq = -al * $sin(r) + be * $cos(r);
    checks += 2;
    if (((real'(d) - ed) > 2.0 || (ed - real'(d)) > 2.0)) begin failures++; $display("FAIL d %0d exp %f (a=%0d b=%0d t=%0d)", d, ed, al, be, th); end
    if (((real'(q) - eq) > 2.0 || (eq - real'(q)) > 2.0)) begin failures++; $display("FAIL q %0d exp %f (a=%0d b=%0d t=%0d)", q, eq, al, be, th); end
  endtask

  initial begin
    alpha = 0; beta = 0; theta = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    check(7, 100, 176);
    checks += 2;
    if (d != 0) begin failures++; $display("FAIL d(176) = %0d", d); end
    if (q != -100) begin failures++; $display("FAIL q(176) = %0d", q); end
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
