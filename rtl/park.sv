// Park transform, (alpha, beta) -> (d, q) in the frame rotating at theta.
//
//   d =  alpha*cos(theta) + beta*sin(theta)
//   q = -alpha*sin(theta) + beta*cos(theta)
// theta is in whole degrees (0..359; only its low 9 bits are used). sin and
// cos come from a registered Q1.14 table, so they follow theta by one clock
// cycle; the products are combinational from alpha and beta and rounded to
// nearest integer. Equations and structure follow the reference design; the
// fixed-point arithmetic replaces its real numbers.
module park #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                reset,
  input  logic signed [W-1:0] alpha,
  input  logic signed [W-1:0] beta,
  input  logic signed [W-1:0] theta,
  output logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);
  import foc_pkg::*;

  trig_t sin_t, cos_t;

  trigonometry u_trig (.clk, .reset, .address(theta[8:0]), .sin(sin_t), .cos(cos_t));

  assign d = W'(rshift_round( longint'(alpha) * longint'(cos_t) + longint'(beta) * longint'(sin_t), TRIG_FRAC));
  assign q = W'(rshift_round(-longint'(alpha) * longint'(sin_t) + longint'(beta) * longint'(cos_t), TRIG_FRAC));

  logic unused_theta;
  assign unused_theta = ^theta[W-1:9];
endmodule
