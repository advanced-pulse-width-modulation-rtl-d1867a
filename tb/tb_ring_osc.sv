`timescale 1ns/1ps
// tb_ring_osc: checks the behavioural ring-oscillator model: the period of
// every tap is 1/(K_OSC * I_bias), neighbouring taps are 1/M of a period
// apart, each tap has a 50 % duty ratio, and while run is low the ring is
// held in its reset state and restarts from it, tap 1 rising one tap
// delay after run rises.
module tb_ring_osc;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic run = 0;
  logic [M-1:0] taps;
  real ib = 50.0;
  real t_r [M];
  real t_f0;

  ring_osc #(.M(M), .KOSC_MHZ_PER_UA(2.0)) dut (.ibias_ua(ib), .run, .taps);

  task automatic chk(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++; $display("FAIL %s: got %0.4f expected %0.4f", what, got, exp);
    end
  endtask

  initial begin
    real per, t0, t_run;
    logic [M-1:0] rst_pattern;
    #10;
    rst_pattern = taps;
    for (int n = 0; n < 6; n++) begin
      ib = 20.0 + $urandom_range(0, 800) / 10.0;
      per = 1000.0 / (2.0 * ib);
      #1 run = 1; t_run = $realtime;
      @(posedge taps[1]);
      chk("first edge one tap delay after run", $realtime - t_run, per / M, 0.01);
      @(posedge taps[0]); t0 = $realtime;
      @(negedge taps[0]); t_f0 = $realtime;
      chk("duty ratio 50 %", t_f0 - t0, per / 2.0, 0.01);
      @(posedge taps[0]);
      chk("period", $realtime - t0, per, 0.01);
      t0 = $realtime;
      for (int k = 1; k < M; k++) begin
        @(posedge taps[k]);
        chk($sformatf("tap %0d spacing", k), $realtime - t0, per * k / M, 0.01);
      end
      #(per * 2.3) run = 0;
      #5;
      checks++;
      if (taps !== rst_pattern) begin failures++; $display("FAIL reset pattern %b vs %b", taps, rst_pattern); end
      #50;
      checks++;
      if (taps !== rst_pattern) begin failures++; $display("FAIL ring moved while held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
