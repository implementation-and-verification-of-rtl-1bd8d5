// Clarke transform, (a, b, c) -> (alpha, beta), combinational.
//
// alpha = a and beta = (a + 2*b)/sqrt(3), which is exact for balanced
// currents (a + b + c = 0), so c is not needed. beta is computed as
// (a*37837 + b*75674) / 2^16 rounded to nearest: the constants 1/sqrt(3)
// and 2/sqrt(3) with 16 fractional bits. Inputs and outputs are signed
// W-bit integers. Equations follow the reference design; the fixed-point
// arithmetic replaces its real numbers.
module clarke #(
  parameter int W = 32
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] alpha,
  output logic signed [W-1:0] beta
);
  import foc_pkg::*;

  assign alpha = a;
  assign beta  = W'(rshift_round(longint'(a) * CLARKE_K1 + longint'(b) * CLARKE_K2, CLARKE_FRAC));
endmodule
