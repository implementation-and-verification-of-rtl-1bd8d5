// Self-checking testbench for svpwm (HALF_CYCLES = 8).
// Applies reference vectors in every sector and on the thresholds. After
// the two-cycle latency, watches 4 half periods of the gate outputs: the
// applied vector {s[5], s[3], s[1]} must alternate between the sector's two
// vectors (table written out here from the sector rule), each held exactly
// HALF_CYCLES cycles, and the lower gates must be the complements of the
// upper ones. Counts visits to each of the six sectors.
module tb_svpwm;
  localparam int HALF = 8;
  logic clk = 0, reset = 1;
  logic signed [31:0] v_alpha, v_beta;
  logic [1:6] s;
  int checks = 0, failures = 0;
  int visits [7];

  svpwm #(.HALF_CYCLES(HALF)) dut (.clk, .reset, .v_alpha, .v_beta, .s);

  always #5 clk = ~clk;

  function automatic int sector_of(input int a, input int b);
    if (b >= 0) return (a >= 50) ? 3 : (a <= -50) ? 5 : 1;
    return (a >= 50) ? 2 : (a <= -50) ? 4 : 6;
  endfunction

  // {first, second} applied vector per sector, bits {C, B, A}
  function automatic logic [5:0] vectors_of(input int sec);
    case (sec)
      1: return {3'b010, 3'b110};
      2: return {3'b100, 3'b101};
      3: return {3'b100, 3'b110};
      4: return {3'b001, 3'b011};
      5: return {3'b010, 3'b011};
      6: return {3'b001, 3'b101};
      default: return 6'b000000;
    endcase
  endfunction

  task automatic apply(input int a, input int b);
    int sec, run;
    logic [2:0] vh, vl, cur, prev;
    @(negedge clk); v_alpha = a; v_beta = b;
    repeat (3) @(negedge clk);
    sec = sector_of(a, b);
    visits[sec]++;
    {vh, vl} = vectors_of(sec);
    // skip to the next change of applied vector
    prev = {s[5], s[3], s[1]};
    run = 0;
    do begin @(negedge clk); cur = {s[5], s[3], s[1]}; run++; end while (cur == prev && run < 3 * HALF);
    for (int k = 0; k < 4; k++) begin
      prev = {s[5], s[3], s[1]};
      run = 0;
      do begin
        checks += 2;
        if (prev != vh && prev != vl) begin failures++; $display("FAIL sector %0d vector %b", sec, prev); end
        if (s[4] != !s[1] || s[6] != !s[3] || s[2] != !s[5]) begin failures++; $display("FAIL complement %b", s); end
        @(negedge clk); run++;
        cur = {s[5], s[3], s[1]};
      end while (cur == prev && run < 3 * HALF);
      checks++;
      if (run != HALF) begin failures++; $display("FAIL sector %0d held %0d cycles", sec, run); end
    end
  endtask

  initial begin
    v_alpha = 0; v_beta = 0;
    foreach (visits[i]) visits[i] = 0;
    repeat (2) @(negedge clk);
    // reset state S0: upper gates off, lower on; s[1:6] = {s1, s2, s3, s4, s5, s6}
    checks++; if (s != 6'b010101) begin failures++; $display("FAIL reset gates %b", s); end
    reset = 0;
    apply(0, 100);  apply(100, 10);  apply(100, -10); apply(0, -100);
    apply(-100, -10); apply(-100, 10); apply(50, 0); apply(-50, 0); apply(49, -1); apply(-49, 0);
    for (int deg = 0; deg < 360; deg += 7)
      apply($rtoi(100.0 * $cos(3.14159265358979 * deg / 180.0)), $rtoi(100.0 * $sin(3.14159265358979 * deg / 180.0)));
    for (int i = 1; i <= 6; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL sector %0d never reached", i); end
      $display("sector %0d visited %0d times", i, visits[i]);
    end
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
