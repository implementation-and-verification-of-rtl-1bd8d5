// Inverse Park transform, (d, q) -> (alpha, beta) in the stator frame.
//
//   alpha = d*cos(theta) - q*sin(theta)
//   beta  = d*sin(theta) + q*cos(theta)
// theta is in whole degrees (0..359; only its low 9 bits are used). sin and
// cos come from a registered Q1.14 table, one clock cycle after theta; the
// products are combinational from d and q and rounded to nearest integer.
// Equations and structure follow the reference design; the fixed-point
// arithmetic replaces its real numbers.
module invpark #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                reset,
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] q,
  input  logic signed [W-1:0] theta,
  output logic signed [W-1:0] alpha,
  output logic signed [W-1:0] beta
);
  import foc_pkg::*;

  trig_t sin_t, cos_t;

  trigonometry u_trig (.clk, .reset, .address(theta[8:0]), .sin(sin_t), .cos(cos_t));

  assign alpha = W'(rshift_round(longint'(d) * longint'(cos_t) - longint'(q) * longint'(sin_t), TRIG_FRAC));
  assign beta  = W'(rshift_round(longint'(d) * longint'(sin_t) + longint'(q) * longint'(cos_t), TRIG_FRAC));

  logic unused_theta;
  assign unused_theta = ^theta[W-1:9];
endmodule
