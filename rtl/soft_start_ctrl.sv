`timescale 1ns/1ps
// soft_start_ctrl: start-up sequencer of the regulator.
//
// When enable rises the sequencer first spends CAL_SAMPLES ADC sample
// periods in SS_CAL: cal is high, the ADC inputs are shorted to V_ref and the
// ADC stores its offset (the offset cancellation is done during start-up, as
// the document does it). It then enters SS_RAMP, the soft start: the PID
// runs with its proportional and derivative terms disabled and the
// integrator gain set to the start-up gain, so the output follows a ramp
// whose slope that gain sets. Soft start ends at the first ADC sample whose
// error code is zero (the zero-error bin); the sequencer then enters SS_RUN
// and the nominal gains are used. Dropping enable returns it to SS_IDLE from
// any state.
//
// sample_tick is one clk cycle per ADC sample period; de_valid/de come from
// the ADC. The number of calibration samples is this design's choice.
module soft_start_ctrl
  import vr_pkg::*;
#(
  parameter int unsigned CAL_SAMPLES = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      sample_tick,
  input  logic      de_valid,
  input  de_t       de,
  output ss_state_t state,
  output logic      cal
);

  logic [$clog2(CAL_SAMPLES+1)-1:0] n_cal;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SS_IDLE;
      n_cal <= '0;
    end else if (!enable) begin
      state <= SS_IDLE;
      n_cal <= '0;
    end else begin
      unique case (state)
        SS_IDLE: begin
          state <= SS_CAL;
          n_cal <= '0;
        end
        SS_CAL: if (sample_tick) begin
          if (n_cal == ($bits(n_cal))'(CAL_SAMPLES - 1)) state <= SS_RAMP;
          n_cal <= n_cal + 1'b1;
        end
        SS_RAMP: if (de_valid && de == '0) state <= SS_RUN;
        SS_RUN: ;
      endcase
    end
  end

  assign cal = (state == SS_CAL);

endmodule
