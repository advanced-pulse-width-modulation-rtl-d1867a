`timescale 1ns/1ps
// tb_vr_pwm_top: end-to-end test of vr_pwm_top at its default size.
//
// Plant: four-phase synchronous buck (Vin 12 V, 300 nH per phase, 1000 uF
// output capacitance with a 0.6 us ESR time constant). Each phase's switch
// node is Vin while its PWM is high, 0 V while its SR is high, and the body
// diode otherwise (the current then stops at zero: DCM). The model is
// integrated at every gate edge and every controller clock edge.
// Analog front end (not part of the design): the error ADC's two rings are
// biased with I0 +/- G (Vref - Vout), G chosen for a 4 mV quantisation
// step, with a 1 % frequency mismatch that the calibration must remove;
// during calibration both inputs see Vref. The load-current code is
// Iload / 0.3125 A, the feedforward code a 100 us high-pass of Iload in
// 1.25 A steps. The ring-oscillator modulator's minor loop is closed as in
// tb_ro_pwm_detector.
//
// Sequence: soft start at 10 A; deadtime table and settings written over
// MICROWIRE; 10 -> 50 -> 10 A load steps; light load (0.1 A) with a long
// SR deadtime entry (DCM) and a raised minimum duty (pulse skipping);
// two-phase reconfiguration at 180 degrees; disable, program a faster soft
// start and restart. Checks regulation after each
// step, phase spacing, and counts every mechanism: soft start (calibration,
// ramp, run), pulse skip, DCM, integrator switching, feedforward, phase
// reconfiguration, MICROWIRE writes, and ring-oscillator modulator lock. A
// mechanism that never occurs is a failure.
module tb_vr_pwm_top;
  import vr_pkg::*;
  int checks = 0, failures = 0;

  // ---------------- plant constants ----------------
  localparam real VIN = 12.0, L = 300e-9, C = 1000e-6, RESR = 0.6e-6 / 1000e-6;
  localparam real VREF = 1.3, I0 = 100.0, G = 1.0 / (1.536 * 2.0 * 0.004);

  logic rst_n = 0;
  real dpwm_ib = 31.25, adc_ia, adc_ib, ro_ia, ro_ib;
  logic adc_cal;
  logic [IOUT_BITS-1:0] iout_code = 0;
  logic signed [FF_BITS-1:0] ff_code = 0;
  logic cs_n = 1, sk = 0, si = 0, so;
  logic [NPHASE-1:0] pwm, sr;
  ss_state_t vr_state;
  de_t vr_de;
  duty_t vr_duty;
  logic vr_skip;
  logic [2:0] vr_int_sel;
  logic ctrl_clk, pfd_clk = 0;
  logic [15:0] ro_pwm, ro_sat;
  logic [15:0][1:0] ro_level;

  vr_pwm_top dut (
    .rst_n, .dpwm_ibias_ua(dpwm_ib), .adc_ibias_a_ua(adc_ia), .adc_ibias_b_ua(adc_ib),
    .adc_cal, .iout_code, .ff_code, .mw_cs_n(cs_n), .mw_sk(sk), .mw_si(si), .mw_so(so),
    .pwm, .sr, .vr_state, .vr_de, .vr_duty, .vr_skip, .vr_int_sel, .ctrl_clk,
    .pfd_clk, .ro_ibias_a_ua(ro_ia), .ro_ibias_b_ua(ro_ib), .ro_pwm, .ro_level, .ro_sat
  );

  // ---------------- buck power stage ----------------
  real il [NPHASE];
  real vc = 0.0, vout = 0.0, iload = 10.0, ihp = 0.0, ilp = 10.0, t_last = 0.0;
  int  dcm_ns [NPHASE];

  task automatic plant_step();
    real dt, isum, vsw;
    dt = ($realtime - t_last) * 1e-9;
    t_last = $realtime;
    if (dt <= 0.0) return;
    isum = 0.0;
    for (int k = 0; k < NPHASE; k++) begin
      if (pwm[k])      vsw = VIN;
      else if (sr[k])  vsw = 0.0;
      else if (il[k] > 0.0) vsw = -0.6;
      else             vsw = vout;          // diode blocks: current held at zero
      il[k] += (vsw - vout) / L * dt;
      if (!pwm[k] && !sr[k] && il[k] < 0.0) il[k] = 0.0;
      if (!pwm[k] && !sr[k] && il[k] == 0.0) dcm_ns[k] += int'(dt * 1e9);
      isum += il[k];
    end
    vc   += (isum - iload) / C * dt;
    vout  = vc + RESR * (isum - iload);
    // load-current sensing and 100 us high-pass feedforward filter
    ilp  += (iload - ilp) * dt / 100e-6;
    ihp   = iload - ilp;
  endtask

  always @(pwm or sr or posedge ctrl_clk or negedge ctrl_clk) plant_step();

  // analog front end of the error ADC (4 mV per code), with ring mismatch
  always_comb begin
    real ve;
    ve = adc_cal ? 0.0 : (VREF - vout);
    adc_ia = I0 + G * ve;
    adc_ib = (I0 - G * ve) * 1.01;
  end
  always @(posedge ctrl_clk) begin
    int c, f;
    c = int'(iload / 0.3125);
    iout_code <= IOUT_BITS'(c < 0 ? 0 : (c > 255 ? 255 : c));
    f = int'(ihp / 1.25);
    ff_code <= FF_BITS'(f < -32 ? -32 : (f > 31 ? 31 : f));
  end

  // ---------------- ring-oscillator modulator minor loop ----------------
  real ro_vc = 0.5, ro_vfb = 0.5;
  always #2.5 pfd_clk = ~pfd_clk;
  assign ro_ia = 1.136 + 0.2 * (ro_vc - ro_vfb);
  assign ro_ib = 1.136 - 0.2 * (ro_vc - ro_vfb);
  function automatic real lvv(logic [1:0] c);
    case (c) 2'd0: return 0.0; 2'd1: return 0.1; 2'd2: return 0.9; default: return 1.0; endcase
  endfunction
  always @(posedge pfd_clk) begin
    real s;
    s = 0.0;
    for (int i = 0; i < 16; i++) s += lvv(ro_level[i]);
    ro_vfb <= ro_vfb + (s / 16.0 - ro_vfb) * (5.0 / 1000.0);
  end

  // ---------------- mechanism counters ----------------
  int n_cal = 0, n_ramp = 0, n_run = 0, n_skip = 0, n_dcm = 0, n_intsw = 0, n_ff = 0;
  int n_reconf = 0, n_mw = 0, n_ro_lock = 0;
  ss_state_t st_q = SS_IDLE;
  logic [2:0] sel_q = 0;
  logic [NPHASE-1:0] pwm_q = 0;
  real t_rise [NPHASE];
  int dcm_q [NPHASE];
  always @(posedge ctrl_clk) begin
    if (vr_state != st_q) begin
      if (vr_state == SS_CAL)  n_cal++;
      if (vr_state == SS_RAMP) n_ramp++;
      if (vr_state == SS_RUN)  n_run++;
    end
    st_q <= vr_state;
    if (vr_state == SS_RUN && vr_int_sel != sel_q) n_intsw++;
    sel_q <= vr_int_sel;
    if (vr_state == SS_RUN && dut.u_ctrl.u_comb.dff != 0 && dut.u_ctrl.regs.ff_en) n_ff++;
  end
  // skip and DCM are counted once per switching period
  always @(posedge dut.u_ctrl.u_dpwm.cnt[4]) begin
    if (vr_state == SS_RUN && vr_skip) n_skip++;
    for (int k = 0; k < NPHASE; k++) begin
      if (dcm_ns[k] - dcm_q[k] > 30) n_dcm++;
      dcm_q[k] = dcm_ns[k];
    end
  end
  always @(pwm) begin
    for (int k = 0; k < NPHASE; k++) if (pwm[k] && !pwm_q[k]) t_rise[k] = $realtime;
    pwm_q = pwm;
  end

  // ---------------- helpers ----------------
  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t vout=%0.4f)", what, $realtime, vout); end
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
  task automatic mw_write(input logic [6:0] a, input logic [15:0] d);
    logic [15:0] rd, back;
    mw_frame(1, a, d, rd);
    if (a != 7'd16) begin
      mw_frame(0, a, 16'h0, back);
      chk($sformatf("MICROWIRE read-back of register %0d", a), back == d);
    end
    n_mw++;
  endtask

  // mean and peak-to-peak of vout over a window
  task automatic watch(input real ns, output real vmean, output real vmin, output real vmax);
    real s; int n;
    s = 0.0; n = 0; vmin = 100.0; vmax = -100.0;
    repeat (int'(ns / 32.0)) begin
      @(posedge ctrl_clk);
      s += vout; n++;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    vmean = s / n;
  endtask

  task automatic check_ro(real v);
    int hi, n;
    real d, e;
    hi = 0; n = 0;
    repeat (3520) begin @(posedge pfd_clk); hi += ro_pwm[5]; n++; end
    d = real'(hi) / n;
    e = (v - 0.1) / 0.8;
    chk($sformatf("RO modulator duty %0.3f vs %0.3f", d, e), d > e - 0.03 && d < e + 0.03 && ro_sat == 0);
    if (d > e - 0.03 && d < e + 0.03) n_ro_lock++;
  endtask

  initial begin
    real vm, vlo, vhi;
    for (int k = 0; k < NPHASE; k++) begin il[k] = 0.0; dcm_ns[k] = 0; dcm_q[k] = 0; t_rise[k] = 0.0; end
    #500;
    rst_n = 1;

    // ---- soft start at 10 A ----
    iload = 10.0; ilp = 10.0;
    wait (vr_state == SS_RUN);
    $display("run reached at %0t ns, vout=%0.4f", $realtime, vout);
    chk("soft start reaches reference without overshoot", vout > VREF - 0.02 && vout < VREF + 0.02);
    watch(150_000, vm, vlo, vhi);
    $display("10 A: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("10 A regulation", vm > VREF - 0.008 && vm < VREF + 0.008 && vhi - vlo < 0.03);
    check_ro(0.5);

    // ---- settings over MICROWIRE: DCM deadtimes for the lowest load entry ----
    mw_write(7'd16, {1'b0, 7'd0, 8'd10});    // entry 0: td_on  (SR ends early)
    mw_write(7'd16, {1'b0, 7'd1, 8'd10});    // entry 0: td_off
    mw_write(7'd16, {1'b0, 7'd0, 8'd220});   // overwrite: long td_on for DCM
    ro_vc = 0.3;

    // ---- 40 A load step 10 -> 50 A and back ----
    iload = 50.0;
    watch(20_000, vm, vlo, vhi);
    $display("step up: min %0.4f", vlo);
    chk("undershoot on 10->50 A step", vlo > VREF - 0.15);
    watch(130_000, vm, vlo, vhi);
    $display("50 A: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("50 A regulation", vm > VREF - 0.008 && vm < VREF + 0.008);
    check_ro(0.3);
    iload = 10.0;
    watch(20_000, vm, vlo, vhi);
    $display("step down: max %0.4f", vhi);
    chk("overshoot on 50->10 A step", vhi < VREF + 0.15);
    watch(130_000, vm, vlo, vhi);
    chk("back at 10 A regulation", vm > VREF - 0.008 && vm < VREF + 0.008);

    // ---- light load: DCM through the deadtime table, then pulse skipping ----
    iload = 0.1;
    watch(200_000, vm, vlo, vhi);
    $display("0.1 A: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("light-load regulation", vm > VREF - 0.02 && vm < VREF + 0.02);
    mw_write(7'd6, 16'd400);                 // D_min = 400/8192
    watch(150_000, vm, vlo, vhi);
    $display("0.1 A skip: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("pulse-skipping regulation", vm > VREF - 0.03 && vm < VREF + 0.03);
    mw_write(7'd6, 16'd40);

    // ---- phase reconfiguration: two phases at 180 degrees ----
    iload = 20.0;
    watch(100_000, vm, vlo, vhi);
    mw_write(7'd9, 16'd16);                  // phase 1 offset: half a period
    mw_write(7'd12, 16'b0011);               // phases 0 and 1 only
    watch(100_000, vm, vlo, vhi);
    $display("two phases: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("two-phase regulation", vm > VREF - 0.01 && vm < VREF + 0.01);
    begin
      real sp, t2, t3;
      t2 = t_rise[2]; t3 = t_rise[3];
      watch(10_000, vm, vlo, vhi);
      sp = t_rise[1] - t_rise[0];
      if (sp < 0) sp += 1024.0;
      $display("phase 1 lags phase 0 by %0.1f ns", sp);
      chk("two-phase spacing 512 ns", sp > 510.0 && sp < 514.0);
      chk("disabled phases silent", t_rise[2] == t2 && t_rise[3] == t3 && pwm[3:2] == 0);
      if (sp > 510.0 && sp < 514.0 && t_rise[2] == t2) n_reconf++;
    end

    // ---- restart: controller disabled, faster soft start programmed ----
    iload = 1.0;
    mw_write(7'd0, 16'b110);
    #2000;
    chk("disable returns to idle", vr_state == SS_IDLE && pwm == 0);
    #50_000;
    mw_write(7'd15, 16'd8);                  // soft-start step 8 per sample
    mw_write(7'd0, 16'b111);
    begin
      real t0;
      t0 = $realtime;
      fork
        wait (vr_state == SS_RUN);
        #1_000_000;
      join_any
      disable fork;
      $display("restart: run after %0.1f us, vout=%0.4f", ($realtime - t0) / 1000.0, vout);
      chk("second soft start reaches run", vr_state == SS_RUN);
    end
    #200_000;
    watch(100_000, vm, vlo, vhi);
    $display("after restart: mean %0.4f min %0.4f max %0.4f", vm, vlo, vhi);
    chk("regulation after restart", vm > VREF - 0.02 && vm < VREF + 0.02);

    // ---- every mechanism must have occurred ----
    $display("mechanisms: cal=%0d ramp=%0d run=%0d skip=%0d dcm=%0d intsw=%0d ff=%0d reconf=%0d mw=%0d ro=%0d",
             n_cal, n_ramp, n_run, n_skip, n_dcm, n_intsw, n_ff, n_reconf, n_mw, n_ro_lock);
    chk("soft start: calibration",    n_cal > 1);
    chk("soft start: ramp",           n_ramp > 1);
    chk("soft start: run",            n_run > 1);
    chk("pulse skip",                 n_skip > 0);
    chk("DCM",                        n_dcm > 0);
    chk("integrator switching",       n_intsw > 0);
    chk("feedforward",                n_ff > 0);
    chk("phase reconfiguration",      n_reconf > 0);
    chk("MICROWIRE writes",           n_mw > 0);
    chk("RO modulator lock",          n_ro_lock > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
