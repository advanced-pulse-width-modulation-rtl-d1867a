`timescale 1ns/1ps
// vr_controller: power-regulation domain of the four-phase digital
// voltage-regulator controller.
//
// Signal flow per quarter switching period (8 cycles of clk = DPWM tap X0,
// 32 x f_sw; cnt[2:0] is the position):
//   - the ring ADC converts V_e = V_ref - R_ref*I_out - V_o (combined in the
//     analog domain ahead of the ADC) for 6 cycles; at cnt[2:0] = 4 it
//     delivers D_e;
//   - the PID (with soft start and the load-scheduled integrator array)
//     computes D_FB at cnt[2:0] = 5;
//   - at cnt[2:0] = 6 the feedforward term K_FF*ff_code is added, the sum is
//     clipped and compared with D_min (pulse skipping), and the deadtime
//     table is read at the current load-current code;
//   - at the end of cnt[2:0] = 7 the phase whose period starts next takes
//     the command, so the command reaches the DPWM at 4 x f_sw.
// Offsets of the four phases other than multiples of 8 still work but take
// commands at other points of the sequence.
//
// Mode changes are automatic: CCM with a short table deadtime, DCM when the
// table's td_on for light load ends the SR pulse before the current
// reverses, and pulse skipping when the total command falls below D_min.
//
// External analog/mixed-signal parts (not in this module): the 32-tap DPWM
// ring oscillator (taps), the ADC input stage and ring oscillators
// (adc_taps_a/b, adc_run, adc_cal switches), the load-current quantizer
// (iout_code), the feedforward high-pass filter and windowed ADC (ff_code).
// The microcontroller reaches the registers through the MICROWIRE pins.
module vr_controller
  import vr_pkg::*;
#(
  parameter int unsigned ADC_TAPS = 8,
  parameter int unsigned NINT     = 8,
  parameter int unsigned CAL_SAMPLES = 4
) (
  input  logic [NTAPS-1:0]          taps,
  input  logic                      rst_n,
  input  logic [ADC_TAPS-1:0]       adc_taps_a,
  input  logic [ADC_TAPS-1:0]       adc_taps_b,
  output logic                      adc_run,
  output logic                      adc_cal,
  input  logic [IOUT_BITS-1:0]      iout_code,
  input  logic signed [FF_BITS-1:0] ff_code,
  input  logic                      mw_cs_n,
  input  logic                      mw_sk,
  input  logic                      mw_si,
  output logic                      mw_so,
  output logic [NPHASE-1:0]         pwm,
  output logic [NPHASE-1:0]         sr,
  output ss_state_t                 state,
  output de_t                       de,
  output duty_t                     duty,
  output logic                      skip,
  output logic [$clog2(NINT)-1:0]   int_sel
);

  logic clk;
  assign clk = taps[0];

  ctrl_regs_t regs;
  logic [COARSE_BITS-1:0] cnt;
  logic [2:0] phase3;
  logic de_valid, dc_valid, lut_we;
  logic [6:0] lut_waddr;
  logic [7:0] lut_wdata;
  duty_t dc;
  td_t td_on, td_off;
  logic signed [DUTY_BITS:0] dff;
  logic [3:0][15:0] mon;
  logic signed [8+$clog2(ADC_TAPS)+1:0] adc_offset;

  assign phase3 = cnt[2:0];

  microwire_regs u_regs (
    .clk, .rst_n,
    .cs_n (mw_cs_n), .sk (mw_sk), .si (mw_si), .so (mw_so),
    .regs, .lut_we, .lut_waddr, .lut_wdata, .mon
  );

  assign mon[0] = 16'(de);
  assign mon[1] = 16'(duty);
  assign mon[2] = 16'(iout_code);
  assign mon[3] = {11'd0, skip, 2'd0, state};

  ring_adc #(.M(ADC_TAPS), .CW(8)) u_adc (
    .clk, .rst_n, .phase3,
    .cal       (adc_cal),
    .res_shift (regs.res_shift),
    .taps_a    (adc_taps_a),
    .taps_b    (adc_taps_b),
    .osc_run   (adc_run),
    .de, .de_valid,
    .offset    (adc_offset)
  );

  soft_start_ctrl #(.CAL_SAMPLES(CAL_SAMPLES)) u_ss (
    .clk, .rst_n,
    .enable      (regs.enable),
    .sample_tick (phase3 == 3'd4),
    .de_valid, .de,
    .state,
    .cal         (adc_cal)
  );

  pid_compensator #(.NINT(NINT)) u_pid (
    .clk, .rst_n, .state, .de, .de_valid,
    .kp (regs.kp), .ki (regs.ki), .kd (regs.kd), .kss (regs.kss),
    .ramp_step (regs.ramp_step),
    .sched_en (regs.sched_en),
    .iout (iout_code),
    .dc, .dc_valid, .int_sel
  );

  duty_combiner u_comb (
    .clk, .rst_n,
    .update  (phase3 == 3'd6),
    .run     (state == SS_RAMP || state == SS_RUN),
    .dfb     (dc),
    .ff_code,
    .ff_en   (regs.ff_en),
    .kff     (regs.kff),
    .dmin    (regs.dmin),
    .duty, .skip, .dff
  );

  deadtime_lut u_lut (
    .wclk (clk), .rst_n,
    .we (lut_we), .waddr (lut_waddr), .wdata (lut_wdata),
    .rclk (clk),
    .rd_en (phase3 == 3'd6),
    .iout (iout_code),
    .td_on_def (regs.td_on_def), .td_off_def (regs.td_off_def),
    .td_on, .td_off
  );

  dpwm_multiphase #(.N(NPHASE)) u_dpwm (
    .taps, .rst_n,
    .offset (regs.phase_offset),
    .en     (regs.phase_en),
    .duty, .skip, .td_on, .td_off,
    .pwm, .sr, .cnt
  );

endmodule
