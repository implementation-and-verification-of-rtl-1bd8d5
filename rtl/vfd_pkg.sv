// Shared constants and functions of the scalar V/Hz drive.
//
// get_eoc() turns the set frequency (Hz) into the end-of-count value of the
// variable clock divider: eoc = EOC_K / f, and EOC_K at 0 Hz. With a 100 MHz
// clock the divider pulses every eoc+2 cycles and the sine table has 1024
// entries, so the output frequency is 100e6 / (1024 * (eoc + 2)), i.e. about
// 49.8 Hz for eoc = 1960 at 50 Hz. The linearisation constant 98000 follows
// the reference design. sine_table() fills the 1024-entry sine ROM at
// elaboration: entry i = round(AMPLITUDE * sin(2*pi*i/DEPTH)).
package vfd_pkg;

  localparam int unsigned EOC_K     = 98000;  // divider linearisation constant
  localparam int unsigned SINE_DEPTH = 1024;  // sine table entries
  localparam int unsigned SINE_W     = 16;    // signed sample width
  localparam int          SAW_MIN    = -32768; // sawtooth start (-2^15)

  typedef logic signed [SINE_W-1:0] sample_t;

  function automatic logic [31:0] get_eoc(input logic [6:0] freq);
    if (freq > 0) return 32'(EOC_K / int'(freq));
    return 32'(EOC_K);
  endfunction

  // Sine table filled at elaboration; depth and amplitude are parameters of
  // the caller.
  function automatic real sine_value(input int i, input int depth, input int amplitude);
    return $floor(real'(amplitude) * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(depth)) + 0.5);
  endfunction

endpackage
