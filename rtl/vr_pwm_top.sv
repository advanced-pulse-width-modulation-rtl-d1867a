`timescale 1ns/1ps
// vr_pwm_top: the two pulse-width-modulation designs side by side.
//
// 1. The multi-mode four-phase digital voltage-regulator controller
//    (vr_controller) with its three ring oscillators: the 32-tap DPWM ring
//    that also clocks the controller (32 x f_sw) and the two 8-tap state-reset
//    rings of the error ADC. The analog input stage of the ADC is outside:
//    its two bias currents (microamperes) are ports, as are the quantized load
//    current, the feedforward ADC code and the MICROWIRE pins of the
//    embedded microcontroller.
// 2. The ring-oscillator double-edge PWM modulator: two matched
//    current-controlled rings with M = 16 taps and the multi-phase phase
//    detector (ro_pwm_detector). Its input stage, four-level buffers and
//    multi-input low pass filter are analog: the ring bias currents come in
//    as ports and the four-level codes go out, so a model of the analog
//    minor loop closes the loop around this top.
//
// The ring oscillators are behavioural models; everything else is
// synthesizable. The DPWM and modulator rings run freely (also during
// reset, so the controller clock is present while rst_n is low); the ADC
// rings are started and reset by the ADC every sample. Frequency-current gains are 1 MHz per microampere.
module vr_pwm_top
  import vr_pkg::*;
#(
  parameter int unsigned ADC_TAPS = 8,
  parameter int unsigned RO_TAPS  = 16
) (
  input  logic                      rst_n,
  // digital VR controller
  input  real                       dpwm_ibias_ua,
  input  real                       adc_ibias_a_ua,
  input  real                       adc_ibias_b_ua,
  output logic                      adc_cal,
  input  logic [IOUT_BITS-1:0]      iout_code,
  input  logic signed [FF_BITS-1:0] ff_code,
  input  logic                      mw_cs_n,
  input  logic                      mw_sk,
  input  logic                      mw_si,
  output logic                      mw_so,
  output logic [NPHASE-1:0]         pwm,
  output logic [NPHASE-1:0]         sr,
  output ss_state_t                 vr_state,
  output de_t                       vr_de,
  output duty_t                     vr_duty,
  output logic                      vr_skip,
  output logic [2:0]                vr_int_sel,
  output logic                      ctrl_clk,
  // ring-oscillator double-edge modulator
  input  logic                      pfd_clk,
  input  real                       ro_ibias_a_ua,
  input  real                       ro_ibias_b_ua,
  output logic [RO_TAPS-1:0]        ro_pwm,
  output logic [RO_TAPS-1:0][1:0]   ro_level,
  output logic [RO_TAPS-1:0]        ro_sat
);

  logic [NTAPS-1:0]    dpwm_taps;
  logic [ADC_TAPS-1:0] adc_taps_a, adc_taps_b;
  logic                adc_run;
  logic [RO_TAPS-1:0]  ro_taps_a, ro_taps_b;

  ring_osc #(.M(NTAPS), .KOSC_MHZ_PER_UA(1.0)) u_dpwm_ring (
    .ibias_ua (dpwm_ibias_ua), .run (1'b1), .taps (dpwm_taps)
  );
  ring_osc #(.M(ADC_TAPS), .KOSC_MHZ_PER_UA(1.0)) u_adc_ring_a (
    .ibias_ua (adc_ibias_a_ua), .run (adc_run), .taps (adc_taps_a)
  );
  ring_osc #(.M(ADC_TAPS), .KOSC_MHZ_PER_UA(1.0)) u_adc_ring_b (
    .ibias_ua (adc_ibias_b_ua), .run (adc_run), .taps (adc_taps_b)
  );

  assign ctrl_clk = dpwm_taps[0];

  vr_controller #(.ADC_TAPS(ADC_TAPS)) u_ctrl (
    .taps (dpwm_taps), .rst_n,
    .adc_taps_a, .adc_taps_b, .adc_run, .adc_cal,
    .iout_code, .ff_code,
    .mw_cs_n, .mw_sk, .mw_si, .mw_so,
    .pwm, .sr,
    .state (vr_state), .de (vr_de), .duty (vr_duty), .skip (vr_skip),
    .int_sel (vr_int_sel)
  );

  ring_osc #(.M(RO_TAPS), .KOSC_MHZ_PER_UA(1.0)) u_ro_a (
    .ibias_ua (ro_ibias_a_ua), .run (1'b1), .taps (ro_taps_a)
  );
  ring_osc #(.M(RO_TAPS), .KOSC_MHZ_PER_UA(1.0)) u_ro_b (
    .ibias_ua (ro_ibias_b_ua), .run (1'b1), .taps (ro_taps_b)
  );

  ro_pwm_detector #(.M(RO_TAPS)) u_ro_pd (
    .clk (pfd_clk), .rst_n,
    .taps_a (ro_taps_a), .taps_b (ro_taps_b),
    .pwm (ro_pwm), .level (ro_level), .sat (ro_sat)
  );

endmodule
