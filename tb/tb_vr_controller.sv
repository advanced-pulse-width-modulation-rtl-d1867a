`timescale 1ns/1ps
// tb_vr_controller: the controller with ideal ring-oscillator models and a
// first-order averaged plant (Vout follows 12 V * D with a 20 us time
// constant). Checks the soft-start sequence IDLE -> CAL -> RAMP -> RUN,
// regulation to 1.3 V, that each phase's PWM pulse width matches the duty
// command, that the phases are a quarter period apart, the MICROWIRE
// monitor read of the duty command, the load-scheduled integrator select,
// and that clearing the enable bit stops switching and returns to IDLE.
module tb_vr_controller;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 0;
  real dpwm_ib = 31.25, ia, ib, vout = 0.0, t_last = 0.0;
  logic [NTAPS-1:0] taps;
  logic [7:0] ta, tb_;
  logic adc_run, adc_cal;
  logic [IOUT_BITS-1:0] iout_code = 8'd40;
  logic signed [FF_BITS-1:0] ff_code = 0;
  logic cs_n = 1, sk = 0, si = 0, so;
  logic [NPHASE-1:0] pwm, sr;
  ss_state_t state;
  de_t de;
  duty_t duty;
  logic skip;
  logic [2:0] int_sel;

  ring_osc #(.M(NTAPS)) u_ring (.ibias_ua(dpwm_ib), .run(1'b1), .taps(taps));
  ring_osc #(.M(8)) u_a (.ibias_ua(ia), .run(adc_run), .taps(ta));
  ring_osc #(.M(8)) u_b (.ibias_ua(ib), .run(adc_run), .taps(tb_));

  vr_controller dut (.taps, .rst_n, .adc_taps_a(ta), .adc_taps_b(tb_), .adc_run, .adc_cal,
    .iout_code, .ff_code, .mw_cs_n(cs_n), .mw_sk(sk), .mw_si(si), .mw_so(so),
    .pwm, .sr, .state, .de, .duty, .skip, .int_sel);

  always @(posedge taps[0]) begin
    real dt;
    dt = $realtime - t_last;
    t_last = $realtime;
    vout += (12.0 * real'(duty) / 8192.0 - vout) * dt / 20_000.0;
  end
  always_comb begin
    real ve;
    ve = adc_cal ? 0.0 : 1.3 - vout;
    ia = 100.0 + 81.4 * ve;
    ib = 100.0 - 81.4 * ve;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t state=%0d vout=%0.4f)", what, $realtime, state, vout); end
  endtask

  task automatic mw_frame(input bit wr, input logic [6:0] a, input logic [15:0] d,
                          output logic [15:0] rd);
    logic [23:0] f;
    f = {wr, a, d};
    rd = '0;
    cs_n = 0; #300;
    for (int i = 0; i < 24; i++) begin
      si = f[23 - i];
      #300; sk = 1;
      if (i >= 8) rd = {rd[14:0], so};
      #300; sk = 0;
    end
    #300; cs_n = 1; #600;
  endtask

  initial begin
    logic [15:0] rd;
    bit seen_cal, seen_ramp;
    real t_r [NPHASE], t_f;
    duty_t dsnap;
    seen_cal = 0; seen_ramp = 0;
    #300;
    rst_n = 1;
    fork
      begin
        while (state != SS_RUN) begin
          @(posedge taps[0]);
          if (state == SS_CAL) seen_cal = 1;
          if (state == SS_RAMP) seen_ramp = 1;
          if (state == SS_RUN) chk("calibration then ramp before run", seen_cal && seen_ramp);
        end
      end
      begin #1_000_000; end
    join_any
    disable fork;
    chk("run reached", state == SS_RUN);
    #100_000;
    chk("regulated to 1.3 V", vout > 1.29 && vout < 1.31);
    chk("integrator select follows load code", int_sel == 3'd1);
    iout_code = 8'd200;
    #2000;
    chk("integrator select follows load code", int_sel == 3'd6);
    // PWM width of phase 0 against the duty command (dither averaged out)
    for (int n = 0; n < 8; n++) begin
      real w, e;
      @(posedge pwm[0]); t_r[0] = $realtime; dsnap = duty;
      @(negedge pwm[0]); w = $realtime - t_r[0];
      e = real'(dsnap) / 8.0;
      chk($sformatf("pwm width %0.1f vs duty %0.1f", w, e), w > e - 1.5 && w < e + 1.5);
    end
    // phase spacing
    @(posedge pwm[0]); t_r[0] = $realtime;
    @(posedge pwm[1]); t_r[1] = $realtime;
    @(posedge pwm[2]); t_r[2] = $realtime;
    @(posedge pwm[3]); t_r[3] = $realtime;
    for (int k = 1; k < NPHASE; k++)
      chk($sformatf("phase %0d delay %0.1f", k, t_r[k] - t_r[k-1]), t_r[k] - t_r[k-1] > 255.0 && t_r[k] - t_r[k-1] < 257.0);
    // SR is never on together with PWM
    begin
      bit overlap;
      overlap = 0;
      for (int n = 0; n < 2000; n++) begin
        @(posedge taps[16]);
        if ((pwm & sr) != 0) overlap = 1;
      end
      chk("no shoot-through", !overlap);
    end
    // monitor read of the duty command
    mw_frame(0, 7'd33, 16'h0, rd);
    chk($sformatf("monitor reads duty %0d/%0d", rd, duty), rd > 16'd500 && rd < 16'd1400);
    // disable
    mw_frame(1, 7'd0, 16'b110, rd);
    #5000;
    chk("disabled: idle", state == SS_IDLE);
    t_f = $realtime;
    fork
      begin @(posedge pwm[0] or posedge pwm[1] or posedge pwm[2] or posedge pwm[3]); chk("disabled: no switching", 0); end
      begin #20_000; end
    join_any
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
