`timescale 1ns/1ps
// tb_dpwm_dither: for random 13-bit commands the sum of 8 consecutive 10-bit
// outputs must equal the command (frac periods lengthened by one LSB), the
// output may only be floor(cmd/8) or floor(cmd/8)+1, and it clips at 959.
module tb_dpwm_dither;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  duty_t duty;
  dpwm_t value;
  always #5 clk = ~clk;

  dpwm_dither dut (.clk, .rst_n, .load, .duty, .value);

  initial begin
    int sum, base;
    duty = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      duty <= (t % 10 == 0) ? duty_t'(960 * 8 + $urandom_range(0, 200)) : duty_t'($urandom_range(0, 959 * 8 + 7));
      @(posedge clk);
      sum = 0;
      base = duty / 8;
      for (int k = 0; k < 8; k++) begin
        load <= 1; @(posedge clk); load <= 0; @(posedge clk);
        sum += value;
        checks++;
        if (base < 959 && value != base && value != base + 1) begin
          failures++; $display("FAIL value %0d for duty %0d", value, duty);
        end
      end
      checks++;
      if (base >= 959) begin
        if (sum != 8 * 959) begin failures++; $display("FAIL clip sum %0d", sum); end
      end else if (sum != duty) begin
        failures++; $display("FAIL sum %0d != duty %0d", sum, duty);
      end
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
