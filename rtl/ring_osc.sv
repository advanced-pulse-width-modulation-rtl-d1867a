`timescale 1ns/1ps
// ring_osc: behavioural model (not synthesizable) of the current-starved
// differential ring oscillator with state reset.
//
// The oscillator has M/2 fully differential delay cells, so it offers M
// equally spaced phase taps. Tap k is a 50 % square wave delayed by k/M of
// the period behind tap 0. Biased in subthreshold, the frequency is linear in
// the bias current, f = KOSC_MHZ_PER_UA * ibias_ua, as the analysis of the
// current-starved ring gives. When run is low the loop is broken and the
// ring is held in a known state (tap 0 high, taps 1..M/2 low, the rest high),
// so every conversion starts from the same phase; the hold takes effect at
// the next tap step. The same cell is used for the DPWM fine-delay ring (32
// taps, fixed bias) and for the two oscillators of each ring ADC.
//
// A bias below 1 kHz worth of current starves the ring: it stops where it
// is until the bias returns.
//
// Ports: ibias_ua (real, microamperes), run, taps[M-1:0].
module ring_osc #(
  parameter int unsigned M               = 32,
  parameter real         KOSC_MHZ_PER_UA = 1.0
) (
  input  real              ibias_ua,
  input  logic             run,
  output logic [M-1:0]     taps
);

  int unsigned ph = 0;   // current phase index, 0..M-1
  real         t_step;   // time between successive tap edges, ns

  always_comb begin
    t_step = 1000.0 / ((KOSC_MHZ_PER_UA * ibias_ua < 0.001 ? 0.001
                                                          : KOSC_MHZ_PER_UA * ibias_ua) * real'(M));
  end

  always begin
    if (!run) begin
      ph = 0;
      @(posedge run);
    end else if (KOSC_MHZ_PER_UA * ibias_ua < 0.001) begin
      @(ibias_ua or run);   // starved: no oscillation until the bias returns
    end else begin
      #(t_step);
      ph = run ? (ph + 1) % M : 0;
    end
  end

  always_comb begin
    for (int k = 0; k < M; k++) begin
      taps[k] = (((ph + M - k) % M) < M/2);
    end
  end

endmodule
