// Variable clock divider.
//
// A counter runs from 0; when it is already above 'eoc' it returns to 0 and
// clk_div is high for that one cycle. The pulse therefore repeats every
// eoc+2 clock cycles, and 'eoc' may change at any time (a counter already
// past a new, smaller eoc wraps on the next cycle). Synchronous active-high
// reset. Behaviour as in the reference design.
module clock_divider #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [CNT_W-1:0] eoc,
  output logic             clk_div
);
  logic [CNT_W-1:0] counter;

  always_ff @(posedge clk) begin
    clk_div <= 1'b0;
    if (reset) begin
      counter <= '0;
    end else if (counter > eoc) begin
      counter <= '0;
      clk_div <= 1'b1;
    end else begin
      counter <= counter + 1'b1;
    end
  end
endmodule
