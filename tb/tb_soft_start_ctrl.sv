`timescale 1ns/1ps
// tb_soft_start_ctrl: enable -> SS_CAL for exactly CAL_SAMPLES sample ticks
// with cal high -> SS_RAMP, which ignores nonzero errors and leaves on the
// first zero-error sample -> SS_RUN; dropping enable returns to SS_IDLE.
module tb_soft_start_ctrl;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, tick = 0, dv = 0;
  de_t de = '0;
  ss_state_t state;
  logic cal;
  always #5 clk = ~clk;

  soft_start_ctrl #(.CAL_SAMPLES(4)) dut (.clk, .rst_n, .enable, .sample_tick(tick),
                                          .de_valid(dv), .de, .state, .cal);

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state=%0d)", what, state); end
  endtask
  task automatic do_tick(int e);
    @(posedge clk); tick <= 1; @(posedge clk); tick <= 0;
    @(posedge clk); dv <= 1; de <= de_t'(e); @(posedge clk); dv <= 0;
    @(posedge clk);
  endtask

  initial begin
    int ncal;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    chk("idle when disabled", state == SS_IDLE && !cal);
    enable <= 1;
    repeat (3) @(posedge clk);
    chk("cal after enable", state == SS_CAL && cal);
    ncal = 0;
    while (state == SS_CAL && ncal < 20) begin do_tick(5); ncal++; end
    chk("cal lasts 4 samples", ncal == 4);
    chk("ramp after cal", state == SS_RAMP && !cal);
    for (int i = 0; i < 10; i++) begin
      do_tick(i % 2 ? -3 : 7);
      chk("stay in ramp while error", state == SS_RAMP);
    end
    do_tick(0);
    chk("run at zero error", state == SS_RUN);
    do_tick(9);
    chk("run holds", state == SS_RUN);
    enable <= 0;
    repeat (2) @(posedge clk);
    chk("idle after disable", state == SS_IDLE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
