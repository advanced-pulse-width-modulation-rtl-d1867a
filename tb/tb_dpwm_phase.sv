`timescale 1ns/1ps
// tb_dpwm_phase: one DPWM phase on a 1 ns/LSB ring. For random duty commands
// (multiples of 8, so no dither) and random deadtimes it measures every
// period: PWM width = duty/8 ns, SR rise = PWM fall + td_off, SR fall =
// next PWM rise - td_on, PWM rise 48 ns after the period start (the fixed
// latency). It then checks that SR is suppressed when d + td_off reaches the
// SR fall time (DCM deadtime), that skip removes PWM and SR, and that a
// dithered command averages to duty/8 over 8 periods.
module tb_dpwm_phase;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0;
  logic [31:0] taps;
  logic [4:0] cnt;
  duty_t duty;
  logic skip, en;
  td_t td_on, td_off;
  logic pwm, sr;
  dpwm_t value;
  real t_pr, t_pf, t_sr, t_sf, t_start;
  int n_pr = 0, n_sr = 0;
  real width_sum;

  ring_osc #(.M(32)) u_ring (.ibias_ua(31.25), .run(rst_n), .taps);
  always_ff @(posedge taps[0] or negedge rst_n)
    if (!rst_n) cnt <= '0; else cnt <= cnt + 1'b1;

  dpwm_phase dut (.taps, .rst_n, .cnt, .offset(5'd5), .en, .duty, .skip,
                  .td_on, .td_off, .pwm, .sr, .value);

  // period start: X0 edge where cnt - 5 becomes 0, i.e. cnt becomes 5
  always @(posedge taps[0]) if (cnt == 5'd4) t_start = $realtime;
  always @(posedge pwm) begin t_pr = $realtime; n_pr++; end
  always @(negedge pwm) begin t_pf = $realtime; width_sum += t_pf - t_pr; end
  always @(posedge sr)  begin t_sr = $realtime; n_sr++; end
  always @(negedge sr)  t_sf = $realtime;

  task automatic wait_periods(int n);
    repeat (n) begin
      @(posedge taps[0]); while (cnt != 5'd3) @(posedge taps[0]);
    end
  endtask

  task automatic chk(string what, real got, real exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0.3f expected %0.3f (duty=%0d ton=%0d toff=%0d)", what, got, exp,
               duty, td_on, td_off);
    end
  endtask

  initial begin
    int d, ton, toff;
    real pr_prev;
    duty = duty_t'(100*8); skip = 0; en = 1; td_on = 10; td_off = 12;
    #20 rst_n = 1'b1;
    wait_periods(3);
    for (int i = 0; i < 60; i++) begin
      d    = $urandom_range(20, 700);
      ton  = $urandom_range(1, 40);
      toff = $urandom_range(1, 60);
      duty <= duty_t'(d * 8); td_on <= td_t'(ton); td_off <= td_t'(toff);
      wait_periods(2);
      // now in the middle of a period with this setting, PWM has fallen
      pr_prev = t_pr;
      chk("pwm rise latency", t_pr - t_start + 1024.0 * (t_pr < t_start ? 1 : 0), 48.0);
      chk("pwm width", t_pf - t_pr, real'(d));
      wait_periods(1);
      chk("sr rise after pwm fall", t_sr - t_pf, real'(toff));
      // SR fall belongs to the previous period; compare with this period's rise
      chk("sr fall before pwm rise", t_pr - t_sf, real'(ton));
    end
    // DCM: long td_on, SR must not pulse
    duty <= duty_t'(300*8); td_on <= 8'd250; td_off <= 8'd10;
    wait_periods(3);
    begin
      int n0; n0 = n_sr;
      wait_periods(4);
      checks++;
      if (n_sr != n0 + 4) begin failures++; $display("FAIL SR count with td_on=250"); end
      chk("dcm sr width", t_sf - t_sr, real'(1024 - 250 - 300 - 10));
    end
    duty <= duty_t'(800*8); td_on <= 8'd240; td_off <= 8'd10;
    wait_periods(3);
    begin
      int n0; n0 = n_sr;
      wait_periods(4);
      checks++;
      if (n_sr != n0) begin failures++; $display("FAIL SR pulsed although d+td_off > 1024-td_on"); end
    end
    // pulse skipping
    td_on <= 8'd10;
    skip <= 1'b1; duty <= '0;
    wait_periods(2);
    begin
      int np, ns; np = n_pr; ns = n_sr;
      wait_periods(4);
      checks++;
      if (n_pr != np || n_sr != ns || pwm || sr) begin failures++; $display("FAIL skip"); end
    end
    // phase disable
    skip <= 1'b0; duty <= duty_t'(200*8); en <= 1'b0;
    wait_periods(2);
    begin
      int np; np = n_pr;
      wait_periods(3);
      checks++;
      if (n_pr != np) begin failures++; $display("FAIL en"); end
    end
    // dither: 13-bit command 200*8+3 averages to 200.375 ns over 8 periods
    en <= 1'b1; duty <= duty_t'(200*8 + 3);
    wait_periods(3);
    width_sum = 0.0;
    wait_periods(8);
    chk("dither average x8", width_sum, 8.0 * 200.0 + 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
