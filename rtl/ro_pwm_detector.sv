`timescale 1ns/1ps
// ro_pwm_detector: multi-phase phase detector of the ring-oscillator
// double-edge pulse-width modulator.
//
// Instead of comparing the two ring oscillators once per period, each of
// the M uniformly spaced tap pairs has its own four-state comparator
// (pfd_fsm). This gives M uniformly phase-shifted PWM outputs (the
// prototype brings out sixteen) and M four-level feedback codes whose
// analog levels the multi-input low pass filter averages, which lowers the
// ripple and raises the minor-loop bandwidth M times. The input stage,
// oscillators, four-level buffers and filter are analog and outside this
// module.
//
// sat[i] is this design's own addition: it flags a channel sitting in one
// of the two outer states (S0 or S3), which only happens when the two
// oscillators run at different frequencies, i.e. the minor loop is out of
// lock.
module ro_pwm_detector #(
  parameter int unsigned M = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M-1:0]     taps_a,
  input  logic [M-1:0]     taps_b,
  output logic [M-1:0]     pwm,
  output logic [M-1:0][1:0] level,
  output logic [M-1:0]     sat
);

  for (genvar i = 0; i < M; i++) begin : g_pfd
    logic [1:0] st;
    pfd_fsm u_pfd (
      .clk, .rst_n,
      .a     (taps_a[i]),
      .b     (taps_b[i]),
      .pwm   (pwm[i]),
      .level (level[i]),
      .state (st)
    );
    assign sat[i] = (st == 2'b10) || (st == 2'b00);
  end

endmodule
