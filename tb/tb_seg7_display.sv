// Self-checking testbench for seg7_display (REFRESH_W = 6, 16 cycles per
// digit). For values 0..99 and a few above, samples each scanned digit and
// decodes the active-low segments back to a number with its own table:
// digit 0 must show the units, digit 1 the tens (blank below 10), digits 2
// and 3 blank, exactly one anode low.
module tb_seg7_display;
  logic clk = 0, reset = 1;
  logic [6:0] value;
  logic [7:0] cat;
  logic [3:0] an;
  int checks = 0, failures = 0;

  seg7_display #(.REFRESH_W(6)) dut (.clk, .reset, .value, .cat, .an);

  always #5 clk = ~clk;

  // segment pattern {g,f,e,d,c,b,a}, 1 = lit; -1 blank, -2 unknown
  function automatic int decode(input logic [6:0] seg);
    case (seg)
      7'h00: return -1;
      7'h3F: return 0; 7'h06: return 1; 7'h5B: return 2; 7'h4F: return 3; 7'h66: return 4;
      7'h6D: return 5; 7'h7D: return 6; 7'h07: return 7; 7'h7F: return 8; 7'h6F: return 9;
      default: return -2;
    endcase
  endfunction

  initial begin
    int seen [4];
    value = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int v = 0; v < 110; v += (v < 99 ? 1 : 5)) begin
      value = 7'(v);
      repeat (70) @(posedge clk);        // let a full frame pass
      seen = '{-3, -3, -3, -3};
      for (int c = 0; c < 64; c++) begin
        @(posedge clk); #1;
        checks++;
        if (!$onehot(~an) || cat[7] != 1'b1) begin failures++; $display("FAIL anodes %b", an); end
        for (int d = 0; d < 4; d++) if (!an[d]) seen[d] = decode(~cat[6:0]);
      end
      checks += 4;
      if (seen[0] != v % 10) begin failures++; $display("FAIL v=%0d units %0d", v, seen[0]); end
      if (seen[1] != ((v % 100) < 10 && v < 10 ? -1 : (v / 10) % 10)) begin failures++; $display("FAIL v=%0d tens %0d", v, seen[1]); end
      if (seen[2] != -1 || seen[3] != -1) begin failures++; $display("FAIL v=%0d left digits %0d %0d", v, seen[2], seen[3]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
