// Scalar (V/Hz) variable-frequency drive for a three-phase induction motor.
//
// The up/down buttons set the output frequency in 1 Hz steps, 0..MAX_FREQ.
// The frequency sets the end count of a variable clock divider (eoc =
// 98000/f); each divider pulse advances three sine-table addresses that sit
// 120 degrees apart and steps a sawtooth carrier. Each phase's sine sample,
// scaled by the V/Hz factor (f*100/MAX_FREQ percent, at most 100), is
// compared with the sawtooth: pwm = sawtooth < sine, giving sinusoidal PWM.
// Each PWM bit drives one inverter leg through a dead-time generator:
// phase 1 -> s[1]/s[4], phase 2 -> s[3]/s[6], phase 3 -> s[5]/s[2].
// With a 100 MHz clock, 50 Hz gives eoc = 1960 and a sine period of
// 1024 * 1962 cycles (49.8 Hz).
//
// Other outputs: the raw PWM bits, 'sync' (MSB of the phase-1 address, a
// square wave at the sine frequency), reset_out (reset passed on to the
// power module), enable_led (all on while the drive runs) and the set
// frequency on the 7-segment display. All resets are synchronous and
// active high. The datapath follows the reference design; sync, reset_out,
// the button pulse circuit and the display are this design's choices.
module vfd #(
  parameter int unsigned MAX_FREQ    = 50,
  parameter int unsigned DEAD_CYCLES = 300,
  parameter int unsigned REFRESH_W   = 18
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        down,
  input  logic        up,
  output logic        reset_out,
  output logic        pwm_wave_ph1_out,
  output logic        pwm_wave_ph2_out,
  output logic        pwm_wave_ph3_out,
  output logic        sync,
  output logic [1:6]  s,
  output logic [15:0] enable_led,
  output logic [7:0]  cat,
  output logic [3:0]  an
);
  import vfd_pkg::*;

  logic        up_pulse, down_pulse;
  logic [6:0]  current_freq, factor;
  logic [31:0] eoc;
  logic        enable, enable_pulse;
  logic        sin_wave_clk_div;
  logic [9:0]  address_ph1, address_ph2, address_ph3;
  sample_t     sin_wave_ph1, sin_wave_ph2, sin_wave_ph3, sawtooth_wave;
  logic        pwm_wave_ph1, pwm_wave_ph2, pwm_wave_ph3;

  btn_pulse u_up   (.clk, .reset, .btn(up),   .pulse(up_pulse));
  btn_pulse u_down (.clk, .reset, .btn(down), .pulse(down_pulse));

  freq_ctrl #(.MAX_FREQ(MAX_FREQ)) u_freq (
    .clk, .reset, .up_pulse, .down_pulse,
    .current_freq, .factor, .eoc, .enable, .enable_pulse);

  clock_divider #(.CNT_W(32)) u_div (
    .clk, .reset, .eoc, .clk_div(sin_wave_clk_div));

  sawtooth_gen #(.STEP(2048)) u_saw (
    .clk, .reset, .enable, .tick(sin_wave_clk_div), .sawtooth_wave);

  sine_addr_gen u_addr (
    .clk, .reset, .enable, .enable_pulse, .tick(sin_wave_clk_div),
    .address_ph1, .address_ph2, .address_ph3);

  sin_rom u_rom_ph1 (.clk, .factor, .address(address_ph1), .data_out(sin_wave_ph1));
  sin_rom u_rom_ph2 (.clk, .factor, .address(address_ph2), .data_out(sin_wave_ph2));
  sin_rom u_rom_ph3 (.clk, .factor, .address(address_ph3), .data_out(sin_wave_ph3));

  // Sine-triangle comparison, one per phase.
  assign pwm_wave_ph1 = (sawtooth_wave < sin_wave_ph1) && enable;
  assign pwm_wave_ph2 = (sawtooth_wave < sin_wave_ph2) && enable;
  assign pwm_wave_ph3 = (sawtooth_wave < sin_wave_ph3) && enable;

  phase_gen #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg1 (
    .clk, .reset, .enable, .pwm_in(pwm_wave_ph1), .pwm_h(s[1]), .pwm_l(s[4]));
  phase_gen #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg2 (
    .clk, .reset, .enable, .pwm_in(pwm_wave_ph2), .pwm_h(s[3]), .pwm_l(s[6]));
  phase_gen #(.DEAD_CYCLES(DEAD_CYCLES)) u_leg3 (
    .clk, .reset, .enable, .pwm_in(pwm_wave_ph3), .pwm_h(s[5]), .pwm_l(s[2]));

  seg7_display #(.REFRESH_W(REFRESH_W)) u_disp (
    .clk, .reset, .value(current_freq), .cat, .an);

  assign pwm_wave_ph1_out = pwm_wave_ph1;
  assign pwm_wave_ph2_out = pwm_wave_ph2;
  assign pwm_wave_ph3_out = pwm_wave_ph3;
  assign sync             = address_ph1[9];
  assign reset_out        = reset;
  assign enable_led       = {16{enable}};

  // No leg may have both switches on (short-circuit check).
  a_no_short_circuit: assert property (@(posedge clk)
    !((s[1] && s[4]) || (s[3] && s[6]) || (s[5] && s[2])));
endmodule
