`timescale 1ns/1ps
// integrator_array: load-scheduled bank of digital integrators.
//
// Instead of one integrator, NINT integrators span the load range. A
// decoder addressed by the quantized load current (its top log2(NINT) bits)
// selects one; only the selected integrator accumulates, D_i[n] =
// D_i[n-1] + D_e[n-1], and only its value reaches the PID output. The others
// keep their state, so when the load moves between CCM and DCM the
// integrator that takes over already holds a value near the new steady-state
// duty ratio and no integrator has to slew over a wide range. With sched_en
// low integrator 0 alone is used (the single-integrator compensator).
//
// di_next is the selected integrator plus din, saturated; it is the value
// the PID uses in the sample where update is high, and it is stored at that
// clock edge. clear zeroes all integrators. The number of integrators, their
// width and the equal split of the current code are this design's choices.
module integrator_array
  import vr_pkg::*;
#(
  parameter int unsigned NINT = 8,
  parameter int unsigned W    = INT_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   update,
  input  logic                   load_all,
  input  logic                   sched_en,
  input  logic [IOUT_BITS-1:0]   iout,
  input  logic signed [W-1:0]    din,
  output logic [$clog2(NINT)-1:0] sel,
  output logic signed [W-1:0]    di_next
);

  localparam int unsigned SB = $clog2(NINT);
  localparam logic signed [W:0] IMAX = (W+1)'((1 << (W-1)) - 1);
  localparam logic signed [W:0] IMIN = -(W+1)'(1 << (W-1));

  logic signed [W-1:0] integ [NINT];
  logic signed [W:0]   sum;

  assign sel = sched_en ? iout[IOUT_BITS-1 -: SB] : '0;
  assign sum = (W+1)'(integ[sel]) + (W+1)'(din);

  always_comb begin
    if (sum > IMAX)      di_next = IMAX[W-1:0];
    else if (sum < IMIN) di_next = IMIN[W-1:0];
    else                 di_next = sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NINT; i++) integ[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < NINT; i++) integ[i] <= '0;
    end else if (update && load_all) begin
      for (int i = 0; i < NINT; i++) integ[i] <= di_next;
    end else if (update) begin
      integ[sel] <= di_next;
    end
  end

endmodule
