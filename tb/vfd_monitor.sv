// Testbench monitor for the scalar drive's six gate outputs and its display.
// Every clock it checks that no inverter leg has both switches on, and
// that every turn-on of a switch follows at least DEAD cycles with both
// switches of its leg off. It counts turn-ons (dead times observed) and
// decodes the 7-segment outputs (active low, {dp,g..a}) into the last
// units and tens digits shown (-1 blank, -2 unreadable).
module vfd_monitor #(
  parameter int DEAD = 300
) (
  input logic       clk,
  input logic       active,
  input logic [1:6] s,
  input logic [7:0] cat,
  input logic [3:0] an
);
  int checks = 0, failures = 0, dead_times = 0, shorts = 0;
  int units = -2, tens = -2;
  int off_run [3] = '{0, 0, 0};
  logic [1:0] prev_on [3] = '{2'b00, 2'b00, 2'b00};

  function automatic int decode(input logic [6:0] seg);
    case (seg)
      7'h00: return -1;
      7'h3F: return 0; 7'h06: return 1; 7'h5B: return 2; 7'h4F: return 3; 7'h66: return 4;
      7'h6D: return 5; 7'h7D: return 6; 7'h07: return 7; 7'h7F: return 8; 7'h6F: return 9;
      default: return -2;
    endcase
  endfunction

  always @(posedge clk) begin
    logic [1:0] leg [3];
    leg[0] = {s[1], s[4]};
    leg[1] = {s[3], s[6]};
    leg[2] = {s[5], s[2]};
    if (active) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (leg[k] == 2'b11) begin failures++; shorts++; $display("FAIL short circuit leg %0d", k + 1); end
        if (leg[k] != 2'b00 && leg[k] != prev_on[k]) begin
          checks++;
          if (off_run[k] < DEAD) begin failures++; $display("FAIL leg %0d dead time %0d", k + 1, off_run[k]); end
          else dead_times++;
        end
        off_run[k] = (leg[k] == 2'b00) ? off_run[k] + 1 : 0;
        prev_on[k] = leg[k];
      end
    end
    if (an == 4'b1110) units = decode(~cat[6:0]);
    if (an == 4'b1101) tens = decode(~cat[6:0]);
  end
endmodule
