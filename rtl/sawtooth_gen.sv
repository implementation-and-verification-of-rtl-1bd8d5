// PWM carrier: signed 16-bit sawtooth.
//
// Starts at -2^15 and rises by STEP on every 'tick' (the sine-address divider
// pulse) while enabled. When the value has passed 2^15-1 it returns to -2^15
// on the next enabled cycle, tick or not. With STEP = 2048 one tooth is 32
// ticks plus the return, 33 ticks. The internal value has 17 bits so +2^15
// can be held for that one cycle; the 16-bit output then reads -2^15. Reset
// (synchronous, active high) loads -2^15. Behaviour follows the reference
// design's listing.
module sawtooth_gen #(
  parameter int STEP = 2048
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               enable,
  input  logic               tick,
  output logic signed [15:0] sawtooth_wave
);
  logic signed [16:0] saw_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      saw_q <= 17'(vfd_pkg::SAW_MIN);
    end else if (enable) begin
      if (saw_q > 17'sd32767)
        saw_q <= 17'(vfd_pkg::SAW_MIN);
      else if (tick)
        saw_q <= saw_q + 17'(STEP);
    end
  end

  assign sawtooth_wave = saw_q[15:0];
endmodule
