// Self-checking testbench for foc, at its default parameters.
// Stimulus after the reference verification: theta advances one degree
// every 102 clock cycles (two turns), the phase currents are
// round(100*sin(theta)), round(100*sin(theta+240)), round(100*sin(theta+120))
// and the voltage references are v_d = 86, v_q = 50. Checked against real
// arithmetic done here:
//   i_alpha = i_a, i_beta = (i_a + 2 i_b)/sqrt(3)      within 1
//   i_d = 0, i_q = -100 (a balanced set rotating with theta)  within 2
//   the applied switching vector belongs to the sector of
//   (86 cos - 50 sin, 86 sin + 50 cos), lower gates complementary.
// Counts visits to each sector and to each half of the switching period.
module tb_foc;
  logic clk = 0, reset = 1;
  logic signed [31:0] i_a, i_b, i_c, theta, v_d_ref, v_q_ref;
  logic signed [31:0] i_alpha, i_beta, i_d, i_q;
  logic [1:6] s;
  int checks = 0, failures = 0;
  int visits [7];
  int vec_changes = 0;

  foc dut (.clk, .reset, .i_a, .i_b, .i_c, .theta, .v_d_ref, .v_q_ref, .s, .i_alpha, .i_beta, .i_d, .i_q);

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;

  function automatic int rnd(input real x);
    return $rtoi(x >= 0 ? $floor(x + 0.5) : -$floor(-x + 0.5));
  endfunction

  function automatic int sector_of(input real a, input real b);
    int ia;
    ia = rnd(a);
    if (rnd(b) >= 0) return (ia >= 50) ? 3 : (ia <= -50) ? 5 : 1;
    return (ia >= 50) ? 2 : (ia <= -50) ? 4 : 6;
  endfunction

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

  function automatic bit near(input int got, input real exp_v, input real tol);
    return (real'(got) - exp_v <= tol) && (exp_v - real'(got) <= tol);
  endfunction

  logic [2:0] last_vec;
  always @(posedge clk) begin
    if ({s[5], s[3], s[1]} != last_vec) vec_changes++;
    last_vec <= {s[5], s[3], s[1]};
  end

  initial begin
    real r, va, vb;
    int sec;
    logic [2:0] vh, vl, cur;
    v_d_ref = 86; v_q_ref = 50;
    theta = 0; i_a = 0; i_b = 0; i_c = 0;
    foreach (visits[i]) visits[i] = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int step = 0; step < 720; step++) begin
      int th;
      th = step % 360;
      r = PI * th / 180.0;
      theta = th;
      i_a = rnd(100.0 * $sin(r));
      i_b = rnd(100.0 * $sin(r + 4.0 * PI / 3.0));
      i_c = rnd(100.0 * $sin(r + 2.0 * PI / 3.0));
      repeat (4) @(negedge clk);
      checks += 4;
      if (i_alpha != i_a) begin failures++; $display("FAIL i_alpha at %0d", th); end
      if (!near(i_beta, (i_a + 2.0 * i_b) / $sqrt(3.0), 1.0)) begin failures++; $display("FAIL i_beta %0d at %0d", i_beta, th); end
      if (!near(i_d, 0.0, 2.0)) begin failures++; $display("FAIL i_d %0d at %0d", i_d, th); end
      if (!near(i_q, -100.0, 2.0)) begin failures++; $display("FAIL i_q %0d at %0d", i_q, th); end
      va = 86.0 * $cos(r) - 50.0 * $sin(r);
      vb = 86.0 * $sin(r) + 50.0 * $cos(r);
      sec = sector_of(va, vb);
      {vh, vl} = vectors_of(sec);
      for (int c = 0; c < 98; c++) begin
        cur = {s[5], s[3], s[1]};
        // a rounding difference right at a threshold may pick the neighbour
        if (c == 0) visits[sec]++;
        checks++;
        if (cur != vh && cur != vl &&
            !(near(rnd(va), 50.0, 1.0) || near(rnd(va), -50.0, 1.0) || near(rnd(vb), 0.0, 1.0))) begin
          failures++; $display("FAIL theta %0d sector %0d vector %b", th, sec, cur);
        end
        checks++;
        if (s[4] != !s[1] || s[6] != !s[3] || s[2] != !s[5]) begin failures++; $display("FAIL complement"); end
        @(negedge clk);
      end
    end
    for (int i = 1; i <= 6; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL sector %0d never reached", i); end
    end
    checks++;
    if (vec_changes < 100) begin failures++; $display("FAIL switching vector changed only %0d times", vec_changes); end
    $display("sector visits: %0d %0d %0d %0d %0d %0d, vector changes %0d",
             visits[1], visits[2], visits[3], visits[4], visits[5], visits[6], vec_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
