`timescale 1ns/1ps
// tb_pid_compensator: drives random error codes and load codes and compares
// D_c with a reference of D_c[n+1] = (K_P e[n] + K_D (e[n]-e[n-1]) +
// K_I D_i[n]) / 4 (Q8.2 gains, floor), D_i[n] = D_i[n-1] + e[n-1] kept per
// load-scheduled integrator, clipped to 0..8191. Gains are the prototype's
// (K_P = 32, K_I = 0.25, K_D = 192). In SS_RAMP only kss*D_i counts; in
// SS_IDLE everything clears. In SS_RAMP the integrator step is limited to
// +/-4 and all integrators follow; an integrator holds while D_c is clipped
// and the error pushes further. D_c must appear one clock after de_valid.
module tb_pid_compensator;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, dv = 0;
  ss_state_t state = SS_IDLE;
  de_t de = '0;
  logic [7:0] iout = 0;
  duty_t dc;
  logic dcv;
  logic [2:0] int_sel;
  gain_t kp = 128, ki = 1, kd = 768, kss = 3;
  int integ [8];
  int e1;
  bit clo = 0, chi = 0;
  always #5 clk = ~clk;

  pid_compensator #(.NINT(8)) dut (.clk, .rst_n, .state, .de, .de_valid(dv),
    .kp, .ki, .kd, .kss, .ramp_step(4'd4), .sched_en(1'b1), .iout, .dc, .dc_valid(dcv), .int_sel);

  function automatic int fdiv4(int x); return (x >= 0) ? x / 4 : -((-x + 3) / 4); endfunction
  function automatic int clip(int x); return x < 0 ? 0 : (x > 8191 ? 8191 : x); endfunction

  task automatic step(int e, int cur, bit ramp);
    int s, di, acc, exp, din;
    de <= de_t'(e); iout <= 8'(cur); dv <= 1;
    @(posedge clk); dv <= 0;
    s = cur >> 5;
    din = ramp ? (e1 > 4 ? 4 : (e1 < -4 ? -4 : e1)) : e1;
    di = integ[s] + din;
    if (di > 32767) di = 32767;
    if (di < -32768) di = -32768;
    acc = ramp ? int'(kss) * di : int'(kp) * e + int'(kd) * (e - e1) + int'(ki) * di;
    if (!((clo && e1 < 0) || (chi && e1 > 0))) begin
      if (ramp) for (int i = 0; i < 8; i++) integ[i] = di;
      else integ[s] = di;
    end
    clo = fdiv4(acc) < 0;
    chi = fdiv4(acc) > 8191;
    exp = clip(fdiv4(acc));
    e1 = e;
    #1;
    checks++;
    if (!dcv || dc != exp) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d cur=%0d dc=%0d exp=%0d valid=%0d", e, cur, dc, exp, dcv);
    end
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) integ[i] = 0;
    e1 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    state <= SS_RAMP;
    @(posedge clk);
    for (int t = 0; t < 100; t++) step(20, 37, 1);
    state <= SS_RUN;
    @(posedge clk);
    for (int t = 0; t < 2000; t++)
      step($urandom_range(0, 40) - 20, (t / 100) % 2 ? 200 : 20, 0);
    state <= SS_IDLE;
    repeat (2) @(posedge clk);
    checks++;
    if (dc != 0) begin failures++; $display("FAIL idle dc"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
