// Sine/cosine look-up table for whole-degree angles.
//
// A 360-entry table holds round(2^14 * sin(i degrees)) as signed Q1.14
// (16384 = 1.0), filled at elaboration. Each clock, sin <= table[address]
// and cos <= table[(address + 90) mod 360]: both outputs are registered and
// belong to the same address, one cycle after it. Addresses 360..511 read
// 0. The table-with-offset structure follows the reference design; the
// fixed-point format replaces its real numbers, and the cos address is
// formed without the extra register of the reference model, so sin and cos
// stay aligned. 'reset' is accepted for interface compatibility and does not
// affect the table.
module trigonometry (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [8:0]            address,
  output foc_pkg::trig_t        sin,
  output foc_pkg::trig_t        cos
);
  import foc_pkg::*;

  typedef trig_t rom_t [512];

  function automatic rom_t fill();
    rom_t r;
    for (int i = 0; i < 512; i++)
      r[i] = (i < TRIG_DEPTH) ? trig_t'(trig_value(i)) : '0;
    return r;
  endfunction

  localparam rom_t ROM = fill();

  logic [8:0] address_90;
  assign address_90 = (address >= 9'(TRIG_DEPTH - 90)) ? address - 9'(TRIG_DEPTH - 90)
                                                        : address + 9'd90;

  always_ff @(posedge clk) begin
    sin <= ROM[address];
    cos <= (address < 9'(TRIG_DEPTH)) ? ROM[address_90] : '0;
  end

  logic unused_reset;
  assign unused_reset = reset;
endmodule
