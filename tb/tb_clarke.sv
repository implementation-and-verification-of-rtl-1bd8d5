// Self-checking testbench for clarke.
// Random and balanced three-phase inputs; alpha must equal a and beta must
// equal (a + 2b)/sqrt(3) rounded, computed here in real arithmetic (within
// one unit). Includes the point a = 7, b = 83 (theta = 176 degrees at
// amplitude 100), where beta is 100.
module tb_clarke;
  logic signed [31:0] a, b, alpha, beta;
  int checks = 0, failures = 0;

  clarke dut (.a, .b, .alpha, .beta);

  task automatic check(input int ia, input int ib);
    real eb;
    int e;
    a = ia; b = ib;
    #1;
    eb = (real'(ia) + 2.0 * real'(ib)) / $sqrt(3.0);
    e = $rtoi(eb >= 0 ? $floor(eb + 0.5) : -$floor(-eb + 0.5));
    checks += 2;
    if (alpha != a) begin failures++; $display("FAIL alpha"); end
    if (int'(beta) - e > 1 || e - int'(beta) > 1) begin failures++; $display("FAIL a=%0d b=%0d beta %0d exp %0d", ia, ib, beta, e); end
  endtask

  initial begin
    check(7, 83);
    checks++; if (beta != 100) begin failures++; $display("FAIL beta(7,83) = %0d", beta); end
    for (int deg = 0; deg < 360; deg++)
      check($rtoi(1000.0 * $sin(3.14159265358979 * deg / 180.0)),
            $rtoi(1000.0 * $sin(3.14159265358979 * (deg + 240) / 180.0)));
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(200000)) - 100000, int'($urandom_range(200000)) - 100000);
    check(0, 0); check(-1, -1); check(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
