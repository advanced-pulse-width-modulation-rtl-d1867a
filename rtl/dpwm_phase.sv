`timescale 1ns/1ps
// dpwm_phase: one phase of the DPWM, producing the high-side PWM and the
// low-side synchronous-rectifier (SR) gate commands.
//
// The phase's coarse count is the shared count minus its phase offset (the
// offset delays the phase by that many 32-LSB segments); a
// switching period starts where that count is 0. At the X0 edge that starts
// the period the 13-bit duty command is dithered to a 10-bit value d, and
// the skip flag is captured. Four edge generators (dpwm_edge) share the
// ring-oscillator taps:
//   PWM rise at 0, PWM fall at d                      (frame at segment 0)
//   SR  rise at d + td_off                            (frame at segment 0)
//   SR  fall at 1024 - td_on, just before the next PWM rise (frame at 16)
// all in DPWM LSBs and all delayed by the same 48 LSBs, so the SR is the
// complement of the PWM with deadtime td_off after the PWM falls and td_on
// before it rises again. Each output is the XOR of its two toggles, which
// plays the part of the set-reset flip-flop; the XOR's polarity is
// re-sampled once per period at a time when the output must be low (X8 of
// segment 0 for the PWM, X16 of segment 1 for the SR), so it stays right
// whichever generator fired first after reset or an offset change. If d + td_off reaches the SR
// fall time the SR rise is placed on it and no SR pulse is produced; this is
// how a long td_on from the deadtime table keeps the SR off while the
// inductor current is zero (DCM). Both deadtimes are at least 1 LSB, and the
// SR rise is clipped to 959 LSBs (dpwm_edge's frame limit).
//
// en (phase enable) and skip gate the outputs for whole periods: the PWM gate
// is latched at X8 of segment 0 and the SR gate at X16 of segment 1, times at
// which the gated signal is always low. The generator frames and gating
// times are this design's choices.
module dpwm_phase
  import vr_pkg::*;
(
  input  logic [NTAPS-1:0]       taps,
  input  logic                   rst_n,
  input  logic [COARSE_BITS-1:0] cnt,
  input  logic [COARSE_BITS-1:0] offset,
  input  logic                   en,
  input  duty_t                  duty,
  input  logic                   skip,
  input  td_t                    td_on,
  input  td_t                    td_off,
  output logic                   pwm,
  output logic                   sr,
  output dpwm_t                  value
);

  logic [COARSE_BITS-1:0] cnt_p;
  logic load, skip_q, gate_pwm, gate_sr, par_pwm, par_sr;
  logic t_pr, t_pf, t_sr, t_sf;
  dpwm_t v_srr, v_srf;
  td_t   ton1, toff1;
  logic [DPWM_BITS+1:0] rise_sum, lim;

  assign cnt_p = cnt - offset;
  assign load  = (cnt_p == '1);

  dpwm_dither u_dither (
    .clk (taps[0]), .rst_n, .load, .duty, .value
  );

  always_ff @(posedge taps[0] or negedge rst_n) begin
    if (!rst_n)    skip_q <= 1'b1;
    else if (load) skip_q <= skip;
  end

  // SR edge values
  assign ton1     = (td_on  == '0) ? td_t'(1) : td_on;
  assign toff1    = (td_off == '0) ? td_t'(1) : td_off;
  assign rise_sum = (DPWM_BITS+2)'(value) + (DPWM_BITS+2)'(toff1);
  assign lim      = ((DPWM_BITS+2)'(1024) - (DPWM_BITS+2)'(ton1) < (DPWM_BITS+2)'(DPWM_VMAX)) ?
                    (DPWM_BITS+2)'(1024) - (DPWM_BITS+2)'(ton1) : (DPWM_BITS+2)'(DPWM_VMAX);
  assign v_srr    = (rise_sum > lim) ? lim[DPWM_BITS-1:0] : rise_sum[DPWM_BITS-1:0];
  assign v_srf    = DPWM_BITS'(512) - DPWM_BITS'(ton1);

  dpwm_edge u_pr (.taps, .rst_n, .cnt(cnt_p), .frame_seg(5'd0),  .value('0),   .tgl(t_pr));
  dpwm_edge u_pf (.taps, .rst_n, .cnt(cnt_p), .frame_seg(5'd0),  .value(value), .tgl(t_pf));
  dpwm_edge u_sr (.taps, .rst_n, .cnt(cnt_p), .frame_seg(5'd0),  .value(v_srr), .tgl(t_sr));
  dpwm_edge u_sf (.taps, .rst_n, .cnt(cnt_p), .frame_seg(5'd16), .value(v_srf), .tgl(t_sf));

  // gates and toggle parities, sampled when the signal must be low
  always_ff @(posedge taps[8] or negedge rst_n) begin
    if (!rst_n) begin
      gate_pwm <= 1'b0;
      par_pwm  <= 1'b0;
    end else if (cnt_p == 5'd0) begin
      gate_pwm <= en && !skip_q;
      par_pwm  <= t_pr ^ t_pf;
    end
  end

  always_ff @(posedge taps[16] or negedge rst_n) begin
    if (!rst_n) begin
      gate_sr <= 1'b0;
      par_sr  <= 1'b0;
    end else if (cnt_p == 5'd1) begin
      gate_sr <= en && !skip_q;
      par_sr  <= t_sr ^ t_sf;
    end
  end

  assign pwm = (t_pr ^ t_pf ^ par_pwm) & gate_pwm;
  assign sr  = (t_sr ^ t_sf ^ par_sr)  & gate_sr;

endmodule
