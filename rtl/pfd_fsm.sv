`timescale 1ns/1ps
// pfd_fsm: four-state phase-frequency comparator of the ring-oscillator
// double-edge pulse-width modulator.
//
// Inputs a and b are one tap of each of the two current-controlled ring
// oscillators. A rising edge of a moves the state up, a rising edge of b
// moves it down, saturating at both ends; edges of both in the same clock
// cancel. With the phase difference between 0 and 2*pi the state alternates
// between S1 and S2, and the PWM output, the XNOR of the two state bits, is
// high from an a edge to the next b edge, so the duty ratio equals the phase
// difference over 2*pi. Two a edges in a row (phase beyond 2*pi) reach S3 and
// two b edges in a row (phase below 0) reach S0: the duty ratio saturates at
// 100 % or 0 % while the four-level output keeps driving the minor loop, so
// the two oscillators stay frequency locked.
//
// level is the code for the four-level buffer: 0 = ground (S0), 1 = V_L
// (S1), 2 = V_H (S2), 3 = V_DD (S3). State codes: S0 = 10, S1 = 01,
// S2 = 11, S3 = 00, so that XNOR gives 0, 0, 1, 1.
//
// The document's comparator reacts to the edges directly; this version
// samples a and b with clk through two flip-flops and detects rising edges
// synchronously, so clk must be at least twice as fast as the tap
// frequency, and the PWM edges are delayed by 2-3 clk cycles. The state
// encoding is this design's choice within the XNOR rule.
module pfd_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,
  input  logic       b,
  output logic       pwm,
  output logic [1:0] level,
  output logic [1:0] state
);

  localparam logic [1:0] S0 = 2'b10, S1 = 2'b01, S2 = 2'b11, S3 = 2'b00;

  logic [2:0] a_s, b_s;
  logic up, dn;
  logic [1:0] warm;   // edges are ignored until the synchronisers hold real samples

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          warm <= '0;
    else if (warm != 2'd3) warm <= warm + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_s <= '0;
      b_s <= '0;
    end else begin
      a_s <= {a_s[1:0], a};
      b_s <= {b_s[1:0], b};
    end
  end

  assign up = (warm == 2'd3) && a_s[1] && !a_s[2];
  assign dn = (warm == 2'd3) && b_s[1] && !b_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S1;
    end else if (up && !dn) begin
      unique case (state)
        S0: state <= S1;
        S1: state <= S2;
        default: state <= S3;
      endcase
    end else if (dn && !up) begin
      unique case (state)
        S3: state <= S2;
        S2: state <= S1;
        default: state <= S0;
      endcase
    end
  end

  assign pwm = ~(state[1] ^ state[0]);

  always_comb begin
    unique case (state)
      S0:      level = 2'd0;
      S1:      level = 2'd1;
      S2:      level = 2'd2;
      default: level = 2'd3;
    endcase
  end

endmodule
