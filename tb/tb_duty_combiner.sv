`timescale 1ns/1ps
// tb_duty_combiner: random feedback duty, feedforward code and gain against
// a reference of D = D_fb + (K_FF * ff) / 4 (floor), with skip asserted and
// D = 0 whenever D < D_min or the loop is not running, and D clipped to the
// DPWM maximum. Checks that D holds between update strobes.
module tb_duty_combiner;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, update = 0, run = 0, ff_en = 0;
  duty_t dfb = 0, dmin = 40, duty;
  logic signed [FF_BITS-1:0] ff_code = 0;
  gain_t kff = 4;
  logic skip;
  logic signed [DUTY_BITS:0] dff;
  localparam int DMAX = DPWM_VMAX * 8 + 7;
  always #5 clk = ~clk;

  duty_combiner dut (.clk, .rst_n, .update, .run, .dfb, .ff_code, .ff_en, .kff, .dmin,
                     .duty, .skip, .dff);

  function automatic int fdiv4(int x); return (x >= 0) ? x / 4 : -((-x + 3) / 4); endfunction

  initial begin
    int tot, ed, es, nskip = 0;
    duty_t held;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      run   <= (t % 500) > 10;
      ff_en <= $urandom_range(0, 1);
      kff   <= gain_t'($urandom_range(0, 16));
      ff_code <= FF_BITS'($urandom_range(0, 63));
      dfb   <= (t % 7 == 0) ? duty_t'($urandom_range(0, 8191)) : duty_t'($urandom_range(0, 120));
      update <= 1;
      @(posedge clk); update <= 0;
      #1;
      tot = int'(dfb) + (ff_en ? fdiv4(int'(kff) * int'(ff_code)) : 0);
      if (!run || tot < int'(dmin)) begin ed = 0; es = 1; end
      else if (tot > DMAX) begin ed = DMAX; es = 0; end
      else begin ed = tot; es = 0; end
      nskip += es;
      checks++;
      if (duty != ed || skip != es) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d dfb=%0d ff=%0d kff=%0d en=%0d -> %0d/%0d exp %0d/%0d",
                                    t, dfb, ff_code, kff, ff_en, duty, skip, ed, es);
      end
      held = duty;
      dfb <= duty_t'($urandom);
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (duty != held) begin failures++; $display("FAIL duty changed without update"); end
    end
    checks++;
    if (nskip < 100) begin failures++; $display("FAIL skip never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
