`timescale 1ns/1ps
// deadtime_lut: 128-byte dual-port RAM holding the load-scheduled
// synchronous-rectifier timing.
//
// The write port (byte wide) belongs to the microcontroller, which programs
// the optimal deadtimes found off line. The read port is addressed by the
// quantized output current: entry a = iout[7:2] holds td_on at byte 2a and
// td_off at byte 2a+1, both in DPWM LSBs. A long td_on ends the SR pulse
// before the inductor current would reverse, which is how the converter
// enters DCM at light load. The read is registered on rd_en, once per duty
// command update, so the deadtime reaches the DPWM together with the duty
// command. Each byte has a valid flag cleared at reset; a byte never written
// reads as the default from the register file, so the controller runs
// before any table is loaded. The byte layout, the address decode and the
// valid flags are this design's choices; both ports use clocks supplied by
// the caller (the same clock in this controller).
module deadtime_lut
  import vr_pkg::*;
#(
  parameter int unsigned BYTES = 128
) (
  input  logic                      wclk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(BYTES)-1:0]  waddr,
  input  logic [7:0]                wdata,
  input  logic                      rclk,
  input  logic                      rd_en,
  input  logic [IOUT_BITS-1:0]      iout,
  input  td_t                       td_on_def,
  input  td_t                       td_off_def,
  output td_t                       td_on,
  output td_t                       td_off
);

  localparam int unsigned AB = $clog2(BYTES) - 1;   // entry address bits

  logic [7:0]       mem   [BYTES];
  logic [BYTES-1:0] valid;

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n)  valid        <= '0;
    else if (we) valid[waddr] <= 1'b1;
  end

  logic [AB-1:0] ra;
  assign ra = iout[IOUT_BITS-1 -: AB];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      td_on  <= '0;
      td_off <= '0;
    end else if (rd_en) begin
      td_on  <= valid[{ra, 1'b0}] ? mem[{ra, 1'b0}] : td_on_def;
      td_off <= valid[{ra, 1'b1}] ? mem[{ra, 1'b1}] : td_off_def;
    end
  end

endmodule
