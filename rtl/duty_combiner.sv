`timescale 1ns/1ps
// duty_combiner: load-current feedforward and total duty command.
//
// The load current passes an analog RC high-pass filter and a windowed ADC
// outside this block; ff_code is that ADC's signed code. Here it is scaled
// by the programmable feedforward gain K_FF (unsigned Q8.2), D_FF =
// K_FF*ff_code, and added to the feedback command D_FB from the PID. The sum
// is clipped to 0..DUTY_MAX. Multi-mode operation: if the total is below the
// programmable minimum D_min the pulse is skipped (skip high, duty 0), which
// gives variable-frequency pulse skipping at very light load.
//
// Registered on update (one clk per ADC sample, i.e. at the DPWM update rate
// of 4 x f_sw); with run low (regulator off or calibrating) duty is 0 and
// skip is high. DUTY_MAX keeps the hardware DPWM inside its maximum duty
// (see dpwm_edge); the code widths are this design's choices.
module duty_combiner
  import vr_pkg::*;
#(
  parameter int unsigned DUTY_MAX = DPWM_VMAX * 8 + 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      update,
  input  logic                      run,
  input  duty_t                     dfb,
  input  logic signed [FF_BITS-1:0] ff_code,
  input  logic                      ff_en,
  input  gain_t                     kff,
  input  duty_t                     dmin,
  output duty_t                     duty,
  output logic                      skip,
  output logic signed [DUTY_BITS:0] dff
);

  localparam int unsigned AW = DUTY_BITS + 4;

  logic signed [GAIN_BITS+FF_BITS:0] ff_prod;
  logic signed [AW-1:0] total;

  assign ff_prod = $signed({1'b0, kff}) * (GAIN_BITS+FF_BITS+1)'(ff_code);
  assign dff     = (DUTY_BITS+1)'(ff_prod >>> GAIN_FRAC);
  assign total   = $signed({4'b0, dfb}) + (ff_en ? AW'(dff) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty <= '0;
      skip <= 1'b1;
    end else if (update) begin
      if (!run) begin
        duty <= '0;
        skip <= 1'b1;
      end else if (total < $signed({4'b0, dmin})) begin
        duty <= '0;
        skip <= 1'b1;
      end else if (total > AW'(DUTY_MAX)) begin
        duty <= DUTY_BITS'(DUTY_MAX);
        skip <= 1'b0;
      end else begin
        duty <= total[DUTY_BITS-1:0];
        skip <= 1'b0;
      end
    end
  end

endmodule
