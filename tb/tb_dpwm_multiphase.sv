`timescale 1ns/1ps
// tb_dpwm_multiphase: four phases with offsets 0/8/16/24 segments on a
// 1 ns/LSB ring. Every phase must produce the commanded width, and the
// rising edges of consecutive phases must be exactly 256 ns apart (a quarter
// of the 1024 ns period). The module is then reconfigured to two phases
// (offsets 0/16, phases 2 and 3 disabled): 512 ns spacing and no pulses on
// the disabled outputs.
module tb_dpwm_multiphase;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0;
  logic [31:0] taps;
  logic [3:0][4:0] offset;
  logic [3:0] en;
  duty_t duty;
  logic [3:0] pwm, sr;
  logic [4:0] cnt;
  real t_rise [4], t_fall [4];
  int n_rise [4];

  ring_osc #(.M(32)) u_ring (.ibias_ua(31.25), .run(rst_n), .taps);

  dpwm_multiphase dut (.taps, .rst_n, .offset, .en, .duty, .skip(1'b0),
                       .td_on(8'd8), .td_off(8'd8), .pwm, .sr, .cnt);

  for (genvar p = 0; p < 4; p++) begin : g_m
    always @(posedge pwm[p]) begin t_rise[p] = $realtime; n_rise[p]++; end
    always @(negedge pwm[p]) t_fall[p] = $realtime;
  end

  task automatic wait_periods(int n);
    repeat (n) begin
      @(posedge taps[0]); while (cnt != 5'd0) @(posedge taps[0]);
    end
  endtask

  task automatic chk(string what, real got, real exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0.3f expected %0.3f", what, got, exp);
    end
  endtask

  initial begin
    real per;
    for (int p = 0; p < 4; p++) n_rise[p] = 0;
    offset = {5'd24, 5'd16, 5'd8, 5'd0};
    en = 4'hF;
    duty = duty_t'(150 * 8);
    #20 rst_n = 1'b1;
    wait_periods(3);
    for (int k = 0; k < 6; k++) begin
      duty <= duty_t'(($urandom_range(30, 200)) * 8);
      wait_periods(2);
      for (int p = 0; p < 4; p++) chk("width", t_fall[p] - t_rise[p], real'(duty / 8));
      // phase p has offset 8p: its period starts 8p segments later
      for (int p = 1; p < 4; p++) begin
        per = t_rise[p] - t_rise[p-1];
        if (per < 0) per += 1024.0;
        chk("phase spacing", per, 256.0);
      end
    end
    // two-phase configuration
    en <= 4'b0011;
    offset <= {5'd0, 5'd0, 5'd16, 5'd0};
    wait_periods(3);
    begin
      int n2, n3; n2 = n_rise[2]; n3 = n_rise[3];
      wait_periods(2);
      per = t_rise[0] - t_rise[1];
      if (per < 0) per += 1024.0;
      chk("two-phase spacing", per, 512.0);
      chk("phase 1 width", t_fall[1] - t_rise[1], real'(duty / 8));
      checks++;
      if (n_rise[2] != n2 || n_rise[3] != n3) begin failures++; $display("FAIL disabled phase pulsed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
