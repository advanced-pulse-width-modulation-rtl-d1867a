`timescale 1ns/1ps
// ring_adc: digital section of the ring-oscillator error ADC.
//
// The analog front end turns the error voltage V_e = V_ref - R_ref*I_out - V_o
// into a differential bias current for two matched state-reset ring
// oscillators (osc A gets I0 + Gm*V_e, osc B gets I0 - Gm*V_e). This block
// counts the rising edges on all M taps of each oscillator during a
// conversion window, so one oscillator period adds M counts and the
// resolution is M times that of a single-tap counter. The error code is the
// count difference A - B, minus the stored offset, shifted right by the
// programmable resolution setting and clipped to the signed DE_BITS window.
//
// Offset cancellation: while cal is high the analog inputs are shorted to
// V_ref; each conversion then stores its raw difference as the offset, and
// de is held at its last value (de_valid stays low).
//
// Timing, in cycles of clk (the DPWM coarse clock, 8 cycles per sample):
// the oscillators run while osc_run is high. At the clock edge where
// phase3 == 3 osc_run falls and the rings are reset, which stops every tap
// counter; at phase3 == 4 the stable counts are read, de/de_valid are
// registered and the counters are cleared; at phase3 == 5 the rings restart.
// The conversion window is therefore 6 of the 8 cycles. Stopping the rings
// before reading is what makes the tap-clocked counters safe to read from the
// clk domain. The window placement is this design's choice.
module ring_adc
  import vr_pkg::*;
#(
  parameter int unsigned M  = 8,   // taps per oscillator (4 differential stages)
  parameter int unsigned CW = 8    // per-tap counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           phase3,
  input  logic                 cal,
  input  logic [2:0]           res_shift,
  input  logic [M-1:0]         taps_a,
  input  logic [M-1:0]         taps_b,
  output logic                 osc_run,
  output de_t                  de,
  output logic                 de_valid,
  output logic signed [CW+$clog2(M)+1:0] offset
);

  localparam int unsigned SW = CW + $clog2(M);   // sum width
  localparam int unsigned RW = SW + 2;           // signed difference width

  logic clr;
  logic [M-1:0][CW-1:0] cnt_a, cnt_b;

  for (genvar i = 0; i < M; i++) begin : g_cnt
    logic [CW-1:0] ca, cb;
    always_ff @(posedge taps_a[i] or posedge clr) begin
      if (clr)          ca <= '0;
      else if (osc_run) ca <= ca + 1'b1;
    end
    always_ff @(posedge taps_b[i] or posedge clr) begin
      if (clr)          cb <= '0;
      else if (osc_run) cb <= cb + 1'b1;
    end
    assign cnt_a[i] = ca;
    assign cnt_b[i] = cb;
  end

  logic [SW-1:0] sum_a, sum_b;
  always_comb begin
    sum_a = '0;
    sum_b = '0;
    for (int i = 0; i < M; i++) begin
      sum_a = sum_a + SW'(cnt_a[i]);
      sum_b = sum_b + SW'(cnt_b[i]);
    end
  end

  logic signed [RW-1:0] raw, corr, shifted;
  assign raw     = $signed({2'b00, sum_a}) - $signed({2'b00, sum_b});
  assign corr    = raw - offset;
  assign shifted = corr >>> res_shift;

  localparam logic signed [RW-1:0] DE_MAX = RW'((1 << (DE_BITS-1)) - 1);
  localparam logic signed [RW-1:0] DE_MIN = -RW'(1 << (DE_BITS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      osc_run  <= 1'b0;
      clr      <= 1'b1;
      de       <= '0;
      de_valid <= 1'b0;
      offset   <= '0;
    end else begin
      de_valid <= 1'b0;
      unique case (phase3)
        3'd3: osc_run <= 1'b0;
        3'd4: begin
          clr <= 1'b1;
          if (cal) begin
            offset <= raw;
          end else begin
            de_valid <= 1'b1;
            if (shifted > DE_MAX)      de <= DE_MAX[DE_BITS-1:0];
            else if (shifted < DE_MIN) de <= DE_MIN[DE_BITS-1:0];
            else                       de <= shifted[DE_BITS-1:0];
          end
        end
        3'd5: begin
          clr     <= 1'b0;
          osc_run <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
