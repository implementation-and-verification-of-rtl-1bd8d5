// Inverter-leg driver with dead time.
//
// Makes the upper (pwm_h) and lower (pwm_l) gate signals of one inverter leg
// from one PWM bit. In the cycle after pwm_in changes both outputs are off;
// they stay off for DEAD_CYCLES cycles, then the side chosen by pwm_in turns
// on (pwm_h for 1, pwm_l for 0). A change during the dead time restarts it,
// so the two switches of a leg are never on together and every turn-on
// follows at least DEAD_CYCLES off cycles. With enable low, or in reset,
// both are off; the dead time also runs when enable rises. Outputs are
// registered. The 3 us dead time (300 cycles at 100 MHz) follows the
// reference design; the counter structure is this design's own.
module phase_gen #(
  parameter int unsigned DEAD_CYCLES = 300
) (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  input  logic pwm_in,
  output logic pwm_h,
  output logic pwm_l
);
  localparam int CW = $clog2(DEAD_CYCLES + 1) + 1;
  logic          last_q;   // pwm level the outputs are heading for
  logic [CW-1:0] dead_q;   // off cycles still to go

  always_ff @(posedge clk) begin
    if (reset || !enable) begin
      last_q <= pwm_in;
      dead_q <= CW'(DEAD_CYCLES);
      pwm_h  <= 1'b0;
      pwm_l  <= 1'b0;
    end else if (pwm_in != last_q) begin
      last_q <= pwm_in;
      dead_q <= CW'(DEAD_CYCLES) - 1'b1;
      pwm_h  <= 1'b0;
      pwm_l  <= 1'b0;
    end else if (dead_q != 0) begin
      dead_q <= dead_q - 1'b1;
      pwm_h  <= 1'b0;
      pwm_l  <= 1'b0;
    end else begin
      pwm_h  <= last_q;
      pwm_l  <= ~last_q;
    end
  end

  // The two switches of a leg must never conduct together.
  a_no_shoot_through: assert property (@(posedge clk) !(pwm_h && pwm_l));
endmodule
