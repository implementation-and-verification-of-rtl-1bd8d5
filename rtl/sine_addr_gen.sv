// Three-phase sine-table address generator.
//
// Three 10-bit counters address the sine ROM of each phase. Reset or the
// enable pulse loads 0, 682 and 341, i.e. 0, 240 and 120 degrees of a
// 1024-entry period; afterwards all three advance by one (wrapping at 1024)
// on each 'tick' while enabled, so the sine frequency is the tick rate
// divided by 1024. Follows the reference design.
module sine_addr_gen (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  input  logic       enable_pulse,
  input  logic       tick,
  output logic [9:0] address_ph1,
  output logic [9:0] address_ph2,
  output logic [9:0] address_ph3
);
  always_ff @(posedge clk) begin
    if (reset || enable_pulse) begin
      address_ph1 <= 10'd0;    // 0 degrees
      address_ph2 <= 10'd682;  // 240 degrees
      address_ph3 <= 10'd341;  // 120 degrees
    end else if (enable && tick) begin
      address_ph1 <= address_ph1 + 1'b1;
      address_ph2 <= address_ph2 + 1'b1;
      address_ph3 <= address_ph3 + 1'b1;
    end
  end
endmodule
