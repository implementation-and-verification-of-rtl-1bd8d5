// Four-digit multiplexed 7-segment display of a number 0..99.
//
// A free-running REFRESH_W-bit counter; its two top bits select the digit,
// right to left, so each digit is lit for 2^(REFRESH_W-2) cycles (2.6 ms
// at 100 MHz with the default). Digit 0 shows the units, digit 1 the tens
// (blank when the value is below 10), digits 2 and 3 are blank. Values
// above 99 show their value modulo 100. Outputs are active low and
// registered: an[k] = 0 lights digit k, cat = {dp, g, f, e, d, c, b, a},
// 0 = segment on, dp always off. The reference design only routes the set
// frequency to this display; scan rate, encoding and blanking are this
// design's choices.
module seg7_display #(
  parameter int unsigned REFRESH_W = 18
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [6:0] value,
  output logic [7:0] cat,
  output logic [3:0] an
);
  logic [REFRESH_W-1:0] scan_q;
  logic [1:0]           digit;
  logic [3:0]           units, tens;
  logic [3:0]           bcd;
  logic                 blank;

  assign digit = scan_q[REFRESH_W-1 -: 2];
  assign units = 4'(value % 7'd10);
  assign tens  = 4'((value / 7'd10) % 7'd10);

  always_comb begin
    bcd   = 4'd0;
    blank = 1'b1;
    unique case (digit)
      2'd0: begin bcd = units; blank = 1'b0; end
      2'd1: begin bcd = tens;  blank = (value < 7'd10); end
      default: ;
    endcase
  end

  function automatic logic [6:0] segments(input logic [3:0] d);  // {g..a}, 1 = on
    case (d)
      4'd0: return 7'b0111111;
      4'd1: return 7'b0000110;
      4'd2: return 7'b1011011;
      4'd3: return 7'b1001111;
      4'd4: return 7'b1100110;
      4'd5: return 7'b1101101;
      4'd6: return 7'b1111101;
      4'd7: return 7'b0000111;
      4'd8: return 7'b1111111;
      4'd9: return 7'b1101111;
      default: return 7'b0000000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      scan_q <= '0;
      cat    <= 8'hFF;
      an     <= 4'hF;
    end else begin
      scan_q <= scan_q + 1'b1;
      cat    <= {1'b1, ~(blank ? 7'b0 : segments(bcd))};
      an     <= ~(4'b0001 << digit);
    end
  end
endmodule
