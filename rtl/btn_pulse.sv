// Push-button to single-pulse converter.
//
// The raw button passes a two-flop synchroniser; 'pulse' is high for one
// clock cycle in the cycle after the synchronised level rises, so a press
// of any length (one clock cycle or more) counts once. Latency: 3 cycles
// from the button edge to the pulse. There is no debouncer: the reference
// design only names the pulse signals, and a bouncing contact can count
// more than once. Synchronous active-high reset.
module btn_pulse (
  input  logic clk,
  input  logic reset,
  input  logic btn,
  output logic pulse
);
  logic [2:0] sync_q;  // [0],[1] synchroniser, [2] previous level

  always_ff @(posedge clk) begin
    if (reset) begin
      sync_q <= '0;
      pulse  <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], btn};
      pulse  <= sync_q[1] & ~sync_q[2];
    end
  end
endmodule
