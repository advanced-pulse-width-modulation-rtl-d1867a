`timescale 1ns/1ps
// pid_compensator: digital PID loop filter with soft-start gain switching
// and a load-scheduled integrator array.
//
// At every ADC sample (de_valid) it computes the duty command for the next
// period,
//   D_c[n+1] = K_P*D_e[n] + K_D*(D_e[n] - D_e[n-1]) + K_I*D_i[n],
//   D_i[n]   = D_i[n-1] + D_e[n-1],
// i.e. H(z) = K_P + K_D(1 - z^-1) + K_I z^-1/(1 - z^-1). D_e is in ADC LSBs
// and D_c in 13-bit DPWM LSBs. Gains are unsigned Q8.2 (prototype: K_P = 32,
// K_I = 0.25, K_D = 192). In SS_RAMP the P and D terms are off and the
// integrator gain is kss; in SS_RUN the nominal gains are used. In SS_IDLE
// and SS_CAL the integrators and history are cleared and D_c is zero.
//
// D_c is registered one clk after de_valid (dc_valid marks it) and clipped
// to 0..2^13-1.
//
// The soft start is programmable, as in the document: during SS_RAMP the
// integrator input is limited to +/-ramp_step per sample (a register), which
// sets the slew rate (with kss = 0.25, ramp_step = 4 and 4 MHz sampling,
// 4 DPWM LSBs per microsecond). This design's own choices, not given by the
// document: the step-limit mechanism itself, and every integrator of the array follows the ramp, so each
// load range starts from the soft-start end value; and the integrator holds
// while D_c is clipped and the error would drive it further (anti-windup).
module pid_compensator
  import vr_pkg::*;
#(
  parameter int unsigned NINT      = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ss_state_t            state,
  input  de_t                  de,
  input  logic                 de_valid,
  input  gain_t                kp,
  input  gain_t                ki,
  input  gain_t                kd,
  input  gain_t                kss,
  input  logic [3:0]           ramp_step,
  input  logic                 sched_en,
  input  logic [IOUT_BITS-1:0] iout,
  output duty_t                dc,
  output logic                 dc_valid,
  output logic [$clog2(NINT)-1:0] int_sel
);

  localparam int unsigned AW = GAIN_BITS + INT_BITS + 4;

  de_t de1;   // D_e[n-1]
  logic signed [INT_BITS-1:0] di_next;
  logic clear, clip_lo, clip_hi, hold;
  logic signed [INT_BITS-1:0] din;
  logic ramp;

  assign clear = (state == SS_IDLE) || (state == SS_CAL);
  assign ramp  = (state == SS_RAMP);
  logic signed [INT_BITS-1:0] RSTEP;
  assign RSTEP = INT_BITS'({1'b0, ramp_step});
  // soft start: the integrator slews at most ramp_step per sample
  always_comb begin
    if (ramp && INT_BITS'(de1) > RSTEP)        din = INT_BITS'(RSTEP);
    else if (ramp && INT_BITS'(de1) < -RSTEP)  din = -INT_BITS'(RSTEP);
    else                            din = INT_BITS'(de1);
  end
  // anti-windup: no integration further into a clipped duty command
  assign hold = (clip_lo && de1 < 0) || (clip_hi && de1 > 0);

  integrator_array #(.NINT(NINT), .W(INT_BITS)) u_int (
    .clk, .rst_n,
    .clear,
    .update  (de_valid && !clear && !hold),
    .load_all(ramp),
    .sched_en,
    .iout,
    .din,
    .sel     (int_sel),
    .di_next
  );

  logic signed [AW-1:0] p_term, d_term, i_term, acc, scaled;
  logic signed [DE_BITS:0] de_diff;

  assign de_diff = (DE_BITS+1)'(de) - (DE_BITS+1)'(de1);
  assign p_term  = ramp ? '0 : $signed({1'b0, kp}) * AW'(de);
  assign d_term  = ramp ? '0 : $signed({1'b0, kd}) * AW'(de_diff);
  assign i_term  = $signed({1'b0, (ramp ? kss : ki)}) * AW'(di_next);
  assign acc     = p_term + d_term + i_term;
  assign scaled  = acc >>> GAIN_FRAC;

  localparam logic signed [AW-1:0] DC_MAX = AW'((1 << DUTY_BITS) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de1      <= '0;
      dc       <= '0;
      dc_valid <= 1'b0;
      clip_lo  <= 1'b0;
      clip_hi  <= 1'b0;
    end else begin
      dc_valid <= 1'b0;
      if (clear) begin
        de1     <= '0;
        dc      <= '0;
        clip_lo <= 1'b0;
        clip_hi <= 1'b0;
      end else if (de_valid) begin
        de1      <= de;
        dc_valid <= 1'b1;
        clip_lo  <= (scaled < 0);
        clip_hi  <= (scaled > DC_MAX);
        if (scaled < 0)           dc <= '0;
        else if (scaled > DC_MAX) dc <= DC_MAX[DUTY_BITS-1:0];
        else                      dc <= scaled[DUTY_BITS-1:0];
      end
    end
  end

endmodule
