// Frequency set-point and V/Hz control.
//
// current_freq is an up/down counter in Hz, limited to 0..MAX_FREQ and moved
// by one-cycle up/down pulses (up wins when both come together). From it,
// registered one cycle later:
//   factor  = min(100, current_freq*100/MAX_FREQ)  amplitude in percent, so
//             voltage rises in proportion to frequency up to the nominal one;
//   eoc     = EOC_K/current_freq (EOC_K at 0 Hz)    clock-divider end count;
//   enable  = current_freq > 0                      drive running;
//   enable_pulse                                    one cycle when enable rises.
// The counter, its limits, the factor rule and the eoc formula follow the
// reference design; enable/enable_pulse being derived from the frequency is
// this design's choice. Synchronous active-high reset.
module freq_ctrl #(
  parameter int unsigned MAX_FREQ = 50
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        up_pulse,
  input  logic        down_pulse,
  output logic [6:0]  current_freq,
  output logic [6:0]  factor,
  output logic [31:0] eoc,
  output logic        enable,
  output logic        enable_pulse
);
  logic [13:0] pct;
  assign pct = 14'(current_freq * 100 / MAX_FREQ);

  always_ff @(posedge clk) begin
    if (reset) begin
      current_freq <= '0;
      factor       <= '0;
      eoc          <= vfd_pkg::get_eoc(7'd0);
      enable       <= 1'b0;
      enable_pulse <= 1'b0;
    end else begin
      if (up_pulse && current_freq < 7'(MAX_FREQ))
        current_freq <= current_freq + 1'b1;
      else if (down_pulse && current_freq > 0)
        current_freq <= current_freq - 1'b1;
      factor       <= (pct > 100) ? 7'd100 : pct[6:0];
      eoc          <= vfd_pkg::get_eoc(current_freq);
      enable       <= (current_freq != 0);
      enable_pulse <= (current_freq != 0) && !enable;
    end
  end

  initial assert (MAX_FREQ > 0 && MAX_FREQ < 128) else $error("MAX_FREQ out of range");
endmodule
