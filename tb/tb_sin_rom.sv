// Self-checking testbench for sin_rom.
// Reads every address at factor 100 and random addresses at random factors,
// and compares each registered output, one cycle after the address, with
// trunc(factor * round(32767*sin(2*pi*i/1024)) / 100) worked out here with
// real arithmetic.
module tb_sin_rom;
  logic clk = 0;
  logic [6:0] factor;
  logic [9:0] address;
  logic signed [15:0] data_out;
  int checks = 0, failures = 0;

  sin_rom dut (.clk, .factor, .address, .data_out);

  always #5 clk = ~clk;

  function automatic int expected(input int addr, input int f);
    int base;
    base = $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * addr / 1024.0) + 0.5));
    return (f * base) / 100;  // int division truncates toward zero
  endfunction

  task automatic check_one(input int addr, input int f);
    @(negedge clk); address = 10'(addr); factor = 7'(f);
    @(posedge clk); #1;
    checks++;
    if (int'(data_out) != expected(addr, f)) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%0d factor=%0d got %0d exp %0d", addr, f, data_out, expected(addr, f));
    end
  endtask

  initial begin
    factor = 0; address = 0;
    for (int i = 0; i < 1024; i++) check_one(i, 100);
    for (int i = 0; i < 2000; i++) check_one(int'($urandom_range(1023)), int'($urandom_range(100)));
    check_one(256, 100);  // peak
    if (data_out != 16'sd32767) begin failures++; $display("FAIL peak %0d", data_out); end
    checks++;
    check_one(768, 37);
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
