// Shared constants of the field-oriented control datapath.
//
// Angles are whole degrees, 0..359. Trigonometric values are signed Q1.14
// fixed point (16384 = 1.0), which replaces the four-decimal real numbers of
// the reference model so the datapath can be synthesised. trig_value(i)
// gives round(2^14 * sin(i degrees)) and fills the look-up table at
// elaboration. The Clarke constants are 1/sqrt(3) and 2/sqrt(3) with 16
// fractional bits. rshift_round() divides by 2^n rounding to nearest (ties
// away from zero), as converting a real to an integer does.
package foc_pkg;

  localparam int TRIG_FRAC   = 14;
  localparam int TRIG_DEPTH  = 360;
  localparam int CLARKE_FRAC = 16;
  localparam longint CLARKE_K1 = 37837;  // round(2^16 / sqrt(3))
  localparam longint CLARKE_K2 = 75674;  // round(2^17 / sqrt(3))

  typedef logic signed [15:0] trig_t;

  function automatic int trig_value(input int deg);
    return $rtoi($floor(16384.0 * $sin(3.14159265358979323846 * real'(deg) / 180.0) + 0.5));
  endfunction

  function automatic longint rshift_round(input longint x, input int n);
    longint half;
    half = longint'(1) <<< (n - 1);
    if (x >= 0) return (x + half) >>> n;
    return -((-x + half) >>> n);
  endfunction

  // SVPWM switching states (one per sector, plus the two zero vectors).
  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5, S6, S7} sv_state_t;

endpackage
