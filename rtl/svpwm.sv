// Space-vector PWM for a three-phase inverter.
//
// 1. Sector: each clock (v_alpha, v_beta) is classified into one of six
//    sectors with two thresholds on alpha at +-THRESH and the sign of beta:
//      beta >= 0: alpha >= THRESH -> 3, alpha <= -THRESH -> 5, else 1
//      beta <  0: alpha >= THRESH -> 2, alpha <= -THRESH -> 4, else 6
//    The sector is registered (0 after reset).
// 2. State machine: the state register follows the sector one cycle later
//    (S0..S7, one state per sector plus the zero vectors). Each state names
//    two adjacent switching vectors, pwm_h and pwm_l, {leg C, leg B, leg A}:
//      S0 000/000  S1 010/110  S2 100/101  S3 100/110
//      S4 001/011  S5 010/011  S6 001/101  S7 111/111
// 3. Switching: a counter alternates the applied vector between pwm_h and
//    pwm_l every HALF_CYCLES clock cycles (5 us at 100 MHz, a fixed 100 kHz
//    pattern with equal times for both vectors).
// 4. Gates: s[1], s[3], s[5] are legs A, B, C of the applied vector and the
//    lower switches are their complements, s[4] = ~s[1], s[6] = ~s[3],
//    s[2] = ~s[5]. No dead time is added here.
// Latency from the reference vector to the state: two clock cycles.
// Sector rule, state table and gate mapping follow the reference design;
// the clocked switching counter replaces its simulation-only timing.
module svpwm #(
  parameter int          W           = 32,
  parameter int          THRESH      = 50,
  parameter int unsigned HALF_CYCLES = 500
) (
  input  logic                clk,
  input  logic                reset,
  input  logic signed [W-1:0] v_alpha,
  input  logic signed [W-1:0] v_beta,
  output logic [1:6]          s
);
  import foc_pkg::*;

  localparam int CW = $clog2(HALF_CYCLES + 1);

  logic [2:0]    sector;
  sv_state_t     state;
  logic [2:0]    pwm_h, pwm_l, vector;
  logic [CW-1:0] half_cnt;
  logic          half_sel;  // 0: pwm_h applied, 1: pwm_l applied

  always_ff @(posedge clk) begin
    if (reset) begin
      sector <= 3'd0;
    end else if (v_beta >= 0) begin
      if (v_alpha >= W'(THRESH))       sector <= 3'd3;
      else if (v_alpha <= -W'(THRESH)) sector <= 3'd5;
      else                             sector <= 3'd1;
    end else begin
      if (v_alpha >= W'(THRESH))       sector <= 3'd2;
      else if (v_alpha <= -W'(THRESH)) sector <= 3'd4;
      else                             sector <= 3'd6;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) state <= S0;
    else       state <= sv_state_t'(sector);
  end

  always_comb begin
    unique case (state)
      S0: begin pwm_h = 3'b000; pwm_l = 3'b000; end
      S1: begin pwm_h = 3'b010; pwm_l = 3'b110; end
      S2: begin pwm_h = 3'b100; pwm_l = 3'b101; end
      S3: begin pwm_h = 3'b100; pwm_l = 3'b110; end
      S4: begin pwm_h = 3'b001; pwm_l = 3'b011; end
      S5: begin pwm_h = 3'b010; pwm_l = 3'b011; end
      S6: begin pwm_h = 3'b001; pwm_l = 3'b101; end
      S7: begin pwm_h = 3'b111; pwm_l = 3'b111; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      half_cnt <= '0;
      half_sel <= 1'b0;
    end else if (half_cnt == CW'(HALF_CYCLES - 1)) begin
      half_cnt <= '0;
      half_sel <= ~half_sel;
    end else begin
      half_cnt <= half_cnt + 1'b1;
    end
  end

  assign vector = half_sel ? pwm_l : pwm_h;

  assign s[1] = vector[0];
  assign s[3] = vector[1];
  assign s[5] = vector[2];
  assign s[4] = ~vector[0];
  assign s[6] = ~vector[1];
  assign s[2] = ~vector[2];
endmodule
