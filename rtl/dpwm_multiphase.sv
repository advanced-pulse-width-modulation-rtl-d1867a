`timescale 1ns/1ps
// dpwm_multiphase: multi-phase hybrid DPWM with programmable deadtime.
//
// One ring oscillator (taps, 32 x f_sw) and one 5-bit coarse counter
// clocked by its tap X0 serve all phases, so the fine resolution and the
// time base are shared and the phases match by construction. Each phase
// adds a constant offset to the counter (0, 8, 16, 24 segments for four
// interleaved phases; 0/16 for two; 0 for one) and can be enabled on its
// own, so the module is reconfigured between one, two and four phases by
// register writes. Every phase latches the duty command at its own period
// start, so with four phases the command is taken up at 4 x f_sw.
//
// cnt is exported: the controller runs on tap X0 and uses cnt[2:0] to
// sequence its ADC sample, PID and command update within each quarter period.
module dpwm_multiphase
  import vr_pkg::*;
#(
  parameter int unsigned N = NPHASE
) (
  input  logic [NTAPS-1:0]                 taps,
  input  logic                             rst_n,
  input  logic [N-1:0][COARSE_BITS-1:0]    offset,
  input  logic [N-1:0]                     en,
  input  duty_t                            duty,
  input  logic                             skip,
  input  td_t                              td_on,
  input  td_t                              td_off,
  output logic [N-1:0]                     pwm,
  output logic [N-1:0]                     sr,
  output logic [COARSE_BITS-1:0]           cnt
);

  always_ff @(posedge taps[0] or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  for (genvar p = 0; p < N; p++) begin : g_ph
    dpwm_t unused_value;
    dpwm_phase u_ph (
      .taps, .rst_n, .cnt,
      .offset (offset[p]),
      .en     (en[p]),
      .duty, .skip, .td_on, .td_off,
      .pwm    (pwm[p]),
      .sr     (sr[p]),
      .value  (unused_value)
    );
  end

endmodule
