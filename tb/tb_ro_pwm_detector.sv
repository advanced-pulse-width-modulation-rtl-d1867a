`timescale 1ns/1ps
// tb_ro_pwm_detector: closes the modulator's minor loop around the
// detector. Two 16-tap ring-oscillator models are biased with
// I0 +/- g (Vc - Vfb), where Vfb is a first-order low pass of the mean of
// the sixteen four-level codes mapped to 0, 0.1, 0.9 and 1.0 (normalised
// V_DD). In lock every channel must show the same duty ratio
// D = (Vc - 0.1) / 0.8, the channels must be spaced by a sixteenth of the
// period, no channel may be saturated, and a step of Vc must move the duty
// ratio to its new value.
module tb_ro_pwm_detector;
  localparam int M = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  logic [M-1:0] ta, tb_, pwm, sat;
  logic [M-1:0][1:0] level;
  real vc = 0.5, vfb = 0.5, i0 = 1.136, g = 0.2, ia, ib;
  always #2.5 clk = ~clk;

  assign ia = i0 + g * (vc - vfb);
  assign ib = i0 - g * (vc - vfb);
  ring_osc #(.M(M), .KOSC_MHZ_PER_UA(1.0)) u_a (.ibias_ua(ia), .run(run), .taps(ta));
  ring_osc #(.M(M), .KOSC_MHZ_PER_UA(1.0)) u_b (.ibias_ua(ib), .run(run), .taps(tb_));

  ro_pwm_detector #(.M(M)) dut (.clk, .rst_n, .taps_a(ta), .taps_b(tb_), .pwm, .level, .sat);

  function automatic real lv(logic [1:0] c);
    case (c) 2'd0: return 0.0; 2'd1: return 0.1; 2'd2: return 0.9; default: return 1.0; endcase
  endfunction
  always @(posedge clk) begin
    real s;
    s = 0.0;
    for (int i = 0; i < M; i++) s += lv(level[i]);
    vfb <= vfb + (s / M - vfb) * (5.0 / 1000.0);   // tau = 1 us
  end

  task automatic check_lock(real vcmd);
    int hi [M];
    real rise [M], d, e, t0, sp;
    logic [M-1:0] prev;
    int ns, bad;
    e = (vcmd - 0.1) / 0.8;
    for (int i = 0; i < M; i++) begin hi[i] = 0; rise[i] = -1.0; end
    ns = 0; bad = 0;
    prev = pwm;
    repeat (3520) begin   // 20 periods of about 880 ns
      @(posedge clk);
      ns++;
      for (int i = 0; i < M; i++) begin
        hi[i] += pwm[i];
        if (pwm[i] && !prev[i]) rise[i] = $realtime;
      end
      if (sat != 0) bad++;
      prev = pwm;
    end
    for (int i = 0; i < M; i++) begin
      d = real'(hi[i]) / ns;
      checks++;
      if (d < e - 0.03 || d > e + 0.03) begin
        failures++; $display("FAIL vc=%0.2f channel %0d duty %0.3f exp %0.3f", vcmd, i, d, e);
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL saturated channels in lock (%0d)", bad); end
    // spacing: channel i's last rising edge lags channel 0's by i/16 of the period
    t0 = rise[0];
    for (int i = 1; i < M; i++) begin
      real per, lagv, expv;
      per = 1000.0 / i0;
      lagv = rise[i] - t0;
      lagv = lagv - per * $floor(lagv / per);
      expv = per * i / M;
      checks++;
      if (lagv < expv - 15.0 || lagv > expv + 15.0) begin
        failures++; $display("FAIL channel %0d lag %0.1f ns exp %0.1f", i, lagv, expv);
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    run = 1;
    #200;
    rst_n = 1;
    #60_000;
    check_lock(0.5);
    vc = 0.3;
    #40_000;
    check_lock(0.3);
    vc = 0.75;
    #40_000;
    check_lock(0.75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
