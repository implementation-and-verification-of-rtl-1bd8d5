// Induction-motor controllers: scalar V/Hz drive and field-oriented control.
//
// Two independent controllers side by side, sharing only clock and reset:
//  - vfd_*: the scalar variable-frequency drive (buttons set 0..MAX_FREQ Hz,
//    sinusoidal PWM with dead time on six gate outputs, 7-segment display);
//  - foc_*: the field-oriented control datapath (Clarke, Park, inverse Park,
//    space-vector PWM) with measured currents, rotor angle and (d,q)
//    voltage references as inputs.
// See vfd.sv and foc.sv for their behaviour and timing. 100 MHz clock,
// synchronous active-high reset.
module motor_ctrl_top #(
  parameter int unsigned MAX_FREQ    = 50,
  parameter int unsigned DEAD_CYCLES = 300,
  parameter int unsigned REFRESH_W   = 18,
  parameter int          W           = 32,
  parameter int unsigned HALF_CYCLES = 500
) (
  input  logic                clk,
  input  logic                reset,
  // scalar drive
  input  logic                vfd_up,
  input  logic                vfd_down,
  output logic                vfd_reset_out,
  output logic [2:0]          vfd_pwm_wave_out,   // [0] phase 1 .. [2] phase 3
  output logic                vfd_sync,
  output logic [1:6]          vfd_s,
  output logic [15:0]         vfd_enable_led,
  output logic [7:0]          vfd_cat,
  output logic [3:0]          vfd_an,
  // field-oriented control
  input  logic signed [W-1:0] foc_i_a,
  input  logic signed [W-1:0] foc_i_b,
  input  logic signed [W-1:0] foc_i_c,
  input  logic signed [W-1:0] foc_theta,
  input  logic signed [W-1:0] foc_v_d_ref,
  input  logic signed [W-1:0] foc_v_q_ref,
  output logic [1:6]          foc_s,
  output logic signed [W-1:0] foc_i_alpha,
  output logic signed [W-1:0] foc_i_beta,
  output logic signed [W-1:0] foc_i_d,
  output logic signed [W-1:0] foc_i_q
);
  vfd #(.MAX_FREQ(MAX_FREQ), .DEAD_CYCLES(DEAD_CYCLES), .REFRESH_W(REFRESH_W)) u_vfd (
    .clk, .reset, .down(vfd_down), .up(vfd_up), .reset_out(vfd_reset_out),
    .pwm_wave_ph1_out(vfd_pwm_wave_out[0]), .pwm_wave_ph2_out(vfd_pwm_wave_out[1]),
    .pwm_wave_ph3_out(vfd_pwm_wave_out[2]), .sync(vfd_sync), .s(vfd_s),
    .enable_led(vfd_enable_led), .cat(vfd_cat), .an(vfd_an));

  foc #(.W(W), .HALF_CYCLES(HALF_CYCLES)) u_foc (
    .clk, .reset, .i_a(foc_i_a), .i_b(foc_i_b), .i_c(foc_i_c), .theta(foc_theta),
    .v_d_ref(foc_v_d_ref), .v_q_ref(foc_v_q_ref), .s(foc_s),
    .i_alpha(foc_i_alpha), .i_beta(foc_i_beta), .i_d(foc_i_d), .i_q(foc_i_q));
endmodule
