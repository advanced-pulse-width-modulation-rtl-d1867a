`timescale 1ns/1ps
// dpwm_dither: turns the 13-bit duty command into the 10-bit value of one
// switching period.
//
// The hardware DPWM resolves 10 bits (about 1 ns at 1 MHz); the loop's
// 13-bit command is reached by dithering the 3 LSBs over 8 periods. A
// 3-bit period counter k advances at every load; in period k one LSB is
// added when frac > bitrev(k), so over any 8 consecutive periods exactly
// frac of them are lengthened and the lengthened periods are spread out
// (pattern order 0,4,2,6,1,5,3,7). The result is clipped to VMAX.
//
// load is one clk pulse per switching period of the phase; value is
// registered on it. The pattern is this design's choice.
module dpwm_dither
  import vr_pkg::*;
#(
  parameter int unsigned VMAX = DPWM_VMAX
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  duty_t duty,
  output dpwm_t value
);

  logic [DITHER_BITS-1:0] k, krev;
  logic [DPWM_BITS:0]     sum;

  always_comb begin
    for (int i = 0; i < DITHER_BITS; i++) krev[i] = k[DITHER_BITS-1-i];
  end

  assign sum = (DPWM_BITS+1)'(duty[DUTY_BITS-1:DITHER_BITS])
             + (DPWM_BITS+1)'(duty[DITHER_BITS-1:0] > krev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k     <= '0;
      value <= '0;
    end else if (load) begin
      k     <= k + 1'b1;
      value <= (sum > (DPWM_BITS+1)'(VMAX)) ? DPWM_BITS'(VMAX) : sum[DPWM_BITS-1:0];
    end
  end

endmodule
