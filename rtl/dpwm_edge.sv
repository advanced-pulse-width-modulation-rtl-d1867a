`timescale 1ns/1ps
// dpwm_edge: one hybrid counter-comparator / ring-oscillator-MUX edge
// generator of the 10-bit DPWM.
//
// The 32 taps of the DPWM ring oscillator (period T_c = T_sw/32, tap spacing
// one LSB = T_c/32) feed every generator; cnt is the coarse count, clocked by
// tap X0, already shifted by the phase offset. A frame is the 32 coarse
// segments that start where cnt == frame_seg. At tap X8 of the frame's first
// segment the generator latches value (5 MSBs for the comparator, 5 LSBs for
// the multiplexer). Each frame it flips its output toggle once, at
//   t = frame start + 48 + value   (in LSBs),
// so two generators on the same frame place two edges exactly value_1 and
// value_2 LSBs apart; the constant 48-LSB latency is common to all edges.
//
// How the fine edge is made race-free. The comparator output cmp (cnt equal
// to the frame's MSB segment) is synchronous to X0. Three flip-flops
// resample it: QA0 at X0 (high from 32 to 64 LSBs after the start of segment
// MSB), QA16d, taken at X16 twice in a row (high from 48 to 80), and QA0d,
// QA0 one segment later (high from 64 to 96).
// The multiplexer selects tap (LSB+16) mod 32, and the second flip-flop,
// clocked by the multiplexer output, toggles when the resampled comparator it
// is paired with is high: QA0 for LSB 0..7, QA16d for 8..23, QA0d for 24..31.
// For every LSB the selected tap edge is at least 8 LSBs away from both
// edges of the flip-flop's data, so no setup or hold time is ever at risk and
// no tap needs to be merged with its neighbour. This follows the document's
// idea (the comparator resampled by a ring tap, a second flip-flop clocked by
// the multiplexer, a second shifted tap choice near X0); the three-sampler
// arrangement and the fixed latency are this design's own. The select
// register changes only at X8 of the frame start, when all three samplers
// are low, so a multiplexer glitch cannot toggle the output. All sampler
// windows close inside the frame only if value <= 959 (DPWM_VMAX), which
// bounds the duty ratio at 959/1024.
module dpwm_edge
  import vr_pkg::*;
(
  input  logic [NTAPS-1:0]       taps,
  input  logic                   rst_n,
  input  logic [COARSE_BITS-1:0] cnt,
  input  logic [COARSE_BITS-1:0] frame_seg,
  input  dpwm_t                  value,
  output logic                   tgl
);

  logic [COARSE_BITS-1:0] msb_q;
  logic [FINE_BITS-1:0]  sel_tap;
  logic [1:0]            qsel;     // 0: QA0, 1: QA16d, 2: QA0d
  logic                  cmp, qa0, qa16, qa16d, qa0d, qa_mux, mux_out;

  // latch the command at X8 of the first segment of the frame
  always_ff @(posedge taps[8] or negedge rst_n) begin
    if (!rst_n) begin
      msb_q   <= '0;
      sel_tap <= FINE_BITS'(16);
      qsel    <= 2'd0;
    end else if (cnt == frame_seg) begin
      msb_q   <= value[DPWM_BITS-1:FINE_BITS];
      sel_tap <= value[FINE_BITS-1:0] + FINE_BITS'(16);
      qsel    <= (value[FINE_BITS-1:0] < 5'd8)  ? 2'd0 :
                 (value[FINE_BITS-1:0] < 5'd24) ? 2'd1 : 2'd2;
    end
  end

  // counter-comparator
  assign cmp = (cnt == COARSE_BITS'(frame_seg + msb_q));

  always_ff @(posedge taps[0] or negedge rst_n) begin
    if (!rst_n) begin
      qa0  <= 1'b0;
      qa0d <= 1'b0;
    end else begin
      qa0  <= cmp;
      qa0d <= qa0;
    end
  end

  always_ff @(posedge taps[16] or negedge rst_n) begin
    if (!rst_n) begin
      qa16  <= 1'b0;
      qa16d <= 1'b0;
    end else begin
      qa16  <= cmp;
      qa16d <= qa16;
    end
  end

  // ring-oscillator multiplexer and second flip-flop
  assign mux_out = taps[sel_tap];
  always_comb begin
    unique case (qsel)
      2'd0:    qa_mux = qa0;
      2'd1:    qa_mux = qa16d;
      default: qa_mux = qa0d;
    endcase
  end

  always_ff @(posedge mux_out or negedge rst_n) begin
    if (!rst_n)      tgl <= 1'b0;
    else if (qa_mux) tgl <= ~tgl;
  end

endmodule
