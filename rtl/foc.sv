// Field-oriented control datapath.
//
// Measured side: the phase currents i_a, i_b go through the Clarke
// transform to (i_alpha, i_beta) and through the Park transform at angle
// theta to (i_d, i_q), the flux and torque currents. Command side: the
// voltage references (v_d_ref, v_q_ref) go through the inverse Park
// transform at the same theta to (v_alpha, v_beta), which the space-vector
// modulator turns into the six inverter gate signals s[1:6].
// As in the reference design the two sides are not closed by PI regulators:
// i_d/i_q are brought out for observation and the voltage references are
// inputs. i_c is accepted but unused, because the Clarke transform assumes
// balanced currents. theta is in whole degrees 0..359; the sin/cos tables
// add one cycle after theta, the modulator two more. Values are signed
// W-bit integers (currents and voltages in the same units as the modulator's
// +-50 sector thresholds, e.g. amplitude 100).
module foc #(
  parameter int          W           = 32,
  parameter int unsigned HALF_CYCLES = 500
) (
  input  logic                clk,
  input  logic                reset,
  input  logic signed [W-1:0] i_a,
  input  logic signed [W-1:0] i_b,
  input  logic signed [W-1:0] i_c,
  input  logic signed [W-1:0] theta,
  input  logic signed [W-1:0] v_d_ref,
  input  logic signed [W-1:0] v_q_ref,
  output logic [1:6]          s,
  output logic signed [W-1:0] i_alpha,
  output logic signed [W-1:0] i_beta,
  output logic signed [W-1:0] i_d,
  output logic signed [W-1:0] i_q
);
  logic signed [W-1:0] v_alpha_ref, v_beta_ref;

  clarke #(.W(W)) inst_clarke (.a(i_a), .b(i_b), .alpha(i_alpha), .beta(i_beta));

  park #(.W(W)) inst_park (
    .clk, .reset, .alpha(i_alpha), .beta(i_beta), .theta, .d(i_d), .q(i_q));

  invpark #(.W(W)) inst_invpark (
    .clk, .reset, .d(v_d_ref), .q(v_q_ref), .theta, .alpha(v_alpha_ref), .beta(v_beta_ref));

  svpwm #(.W(W), .THRESH(50), .HALF_CYCLES(HALF_CYCLES)) inst_svpwm (
    .clk, .reset, .v_alpha(v_alpha_ref), .v_beta(v_beta_ref), .s);

  logic unused_i_c;
  assign unused_i_c = ^i_c;
endmodule
