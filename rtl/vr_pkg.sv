`timescale 1ns/1ps
// vr_pkg: constants and types shared by the four-phase digital voltage
// regulator controller.
//
// The DPWM is a hybrid: 5 coarse bits from a counter clocked by tap X0 of a
// 32-tap ring oscillator running at 32 x f_sw, and 5 fine bits from a
// multiplexer over the 32 taps (10 hardware bits). The duty command of the
// loop is 13 bits; the 3 extra bits are realised by dithering over 8
// switching periods. Gains are unsigned fixed point with 2 fractional bits
// so that the prototype's K_I = 0.25 is exact (K_P = 32, K_I = 0.25,
// K_D = 192 are the reset defaults). The 2-bit fraction, the gain widths
// and the register map are this design's choices.
package vr_pkg;

  localparam int unsigned NTAPS       = 32;  // DPWM ring oscillator taps (16 differential stages)
  localparam int unsigned COARSE_BITS = 5;   // counter-comparator bits
  localparam int unsigned FINE_BITS   = 5;   // ring-oscillator MUX bits
  localparam int unsigned DPWM_BITS   = COARSE_BITS + FINE_BITS;  // 10
  localparam int unsigned DITHER_BITS = 3;
  localparam int unsigned DUTY_BITS   = DPWM_BITS + DITHER_BITS;  // 13
  localparam int unsigned NPHASE      = 4;
  localparam int unsigned DE_BITS     = 8;   // signed ADC error code
  localparam int unsigned GAIN_BITS   = 10;  // Q8.2 unsigned gains
  localparam int unsigned GAIN_FRAC   = 2;
  localparam int unsigned INT_BITS    = 16;  // signed integrator width
  localparam int unsigned TD_BITS     = 8;   // deadtime in DPWM LSBs
  localparam int unsigned IOUT_BITS   = 8;   // quantized load current code
  localparam int unsigned FF_BITS     = 6;   // signed feedforward ADC code

  // Latest fire position (in DPWM LSBs) an edge generator accepts inside
  // its 1024-LSB frame; see dpwm_edge for why the frame has this limit.
  localparam int unsigned DPWM_VMAX   = 959;

  typedef logic [DPWM_BITS-1:0]   dpwm_t;
  typedef logic [DUTY_BITS-1:0]   duty_t;
  typedef logic signed [DE_BITS-1:0] de_t;
  typedef logic [GAIN_BITS-1:0]   gain_t;
  typedef logic [TD_BITS-1:0]     td_t;

  // Start-up sequencer states.
  typedef enum logic [1:0] {
    SS_IDLE = 2'd0,  // regulator disabled, outputs low, integrators cleared
    SS_CAL  = 2'd1,  // ADC inputs shorted to V_ref, offset measured
    SS_RAMP = 2'd2,  // soft start: only the integrator, with the start-up gain
    SS_RUN  = 2'd3   // full PID
  } ss_state_t;

  // Control registers of the regulation loop, written over MICROWIRE.
  typedef struct packed {
    logic                   enable;      // regulator on
    logic                   ff_en;       // load-current feedforward on
    logic                   sched_en;    // load-scheduled integrator array on (else integrator 0 only)
    gain_t                  kp;
    gain_t                  ki;
    gain_t                  kd;
    gain_t                  kss;         // integrator gain during soft start
    gain_t                  kff;         // feedforward gain
    duty_t                  dmin;        // pulse-skipping threshold
    logic [2:0]             res_shift;   // ADC resolution: right shift of the count difference
    logic [3:0]             ramp_step;   // soft-start integrator step per sample
    logic [NPHASE-1:0][COARSE_BITS-1:0] phase_offset;
    logic [NPHASE-1:0]      phase_en;
    td_t                    td_on_def;   // deadtimes used for table entries never written
    td_t                    td_off_def;
  } ctrl_regs_t;

endpackage
