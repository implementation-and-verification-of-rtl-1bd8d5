// Sine ROM with V/Hz amplitude scaling.
//
// Holds one period of a sine wave, DEPTH signed WIDTH-bit samples, entry
// i = round(AMPLITUDE * sin(2*pi*i/DEPTH)), computed at elaboration. Each
// clock the entry at 'address' is multiplied by 'factor' (0..100, a
// percentage) and divided by 100 (truncating toward zero), and the result
// is registered on data_out: one cycle of latency. Depth, width and the
// percentage scaling follow the reference design; the amplitude 32767 (full
// signed 16-bit range) is this design's choice.
module sin_rom #(
  parameter int unsigned DEPTH     = vfd_pkg::SINE_DEPTH,
  parameter int unsigned WIDTH     = 16,
  parameter int          AMPLITUDE = 32767
) (
  input  logic                     clk,
  input  logic [6:0]               factor,
  input  logic [$clog2(DEPTH)-1:0] address,
  output logic signed [WIDTH-1:0]  data_out
);
  typedef logic signed [WIDTH-1:0] rom_t [DEPTH];

  function automatic rom_t fill();
    rom_t r;
    for (int i = 0; i < int'(DEPTH); i++)
      r[i] = WIDTH'($rtoi(vfd_pkg::sine_value(i, int'(DEPTH), AMPLITUDE)));
    return r;
  endfunction

  localparam rom_t ROM = fill();

  logic signed [WIDTH+8:0] product;
  assign product = $signed({1'b0, factor}) * ROM[address];

  always_ff @(posedge clk)
    data_out <= WIDTH'(product / 100);
endmodule
