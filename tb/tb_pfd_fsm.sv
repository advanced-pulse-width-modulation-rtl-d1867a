`timescale 1ns/1ps
// tb_pfd_fsm: two square waves of equal period with a random lag of B
// behind A must give a PWM duty equal to lag/period (within 2 %) and never
// reach the outer states; a faster A must drive the comparator into the
// top state (level 3, PWM held high) and a faster B into the bottom
// state (level 0, PWM held low). Each equal-frequency case restarts the comparator
// from its reset state S1 just after a B edge, as a locked minor loop
// would hold it.
module tb_pfd_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, a = 0, b = 0;
  logic pwm;
  logic [1:0] level, state;
  real pa = 637.0, pb = 637.0, lag = 100.0;
  always #5 clk = ~clk;

  function automatic bit sq(real t, real p);
    real f;
    f = t / p - $floor(t / p);
    return f < 0.5;
  endfunction
  always #1 begin
    a = sq($realtime, pa);
    b = sq($realtime - lag, pb);
  end

  pfd_fsm dut (.clk, .rst_n, .a, .b, .pwm, .level, .state);

  task automatic measure(output real duty, output int lv[4]);
    int hi, tot;
    hi = 0; tot = 0;
    for (int i = 0; i < 4; i++) lv[i] = 0;
    repeat (4000) @(posedge clk);
    repeat (6370) begin
      @(posedge clk);
      tot++; hi += pwm; lv[level]++;
    end
    duty = real'(hi) / tot;
  endtask

  initial begin
    int lv[4];
    real d, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      lag = 30.0 + $urandom_range(0, 570);
      // restart from S1 just after a B edge so that A's edge comes next
      rst_n = 0;
      repeat (3) @(posedge b);
      @(posedge clk); @(posedge clk); @(posedge clk);
      rst_n = 1;
      measure(d, lv);
      e = lag / pa;
      checks++;
      if (d < e - 0.02 || d > e + 0.02 || lv[0] != 0 || lv[3] != 0) begin
        failures++;
        $display("FAIL lag=%0.0f duty=%0.3f exp=%0.3f levels=%0d/%0d/%0d/%0d",
                 lag, d, e, lv[0], lv[1], lv[2], lv[3]);
      end
    end
    pa = 600.0; pb = 637.0;
    measure(d, lv);
    checks++;
    if (d < 0.99 || lv[3] == 0 || lv[1] != 0 || lv[0] != 0) begin
      failures++; $display("FAIL faster A did not saturate high (level=%0d)", level);
    end
    pa = 680.0;
    measure(d, lv);
    checks++;
    if (d > 0.01 || lv[0] == 0 || lv[2] != 0 || lv[3] != 0) begin
      failures++; $display("FAIL faster B did not saturate low (level=%0d)", level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
