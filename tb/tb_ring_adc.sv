`timescale 1ns/1ps
// tb_ring_adc: two 8-tap state-reset ring oscillators (1 MHz/uA) feed the
// ADC back end, clocked at 32 ns with an 8-cycle sample sequence. The
// conversion window is 6 cycles = 192 ns, so an oscillator at f MHz adds
// floor(192 ns * 8 * f) counts (one per tap edge). The testbench checks
// D_e = n_a - n_b exactly for random bias pairs, that calibration stores the
// mismatch and removes it, the resolution shift (arithmetic, toward -inf),
// the +-127 window clipping, and one D_e per 8 cycles.
module tb_ring_adc;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal = 0;
  logic [2:0] phase3;
  logic [2:0] res_shift = 0;
  logic [7:0] ta, tb_;
  logic osc_run, de_valid;
  de_t de;
  logic signed [11:0] offset;
  real fa, fb;
  int n_valid = 0;

  always #16 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase3 <= '0; else phase3 <= phase3 + 1'b1;

  ring_osc #(.M(8)) u_a (.ibias_ua(fa), .run(osc_run), .taps(ta));
  ring_osc #(.M(8)) u_b (.ibias_ua(fb), .run(osc_run), .taps(tb_));

  ring_adc #(.M(8), .CW(8)) dut (.clk, .rst_n, .phase3, .cal, .res_shift,
    .taps_a(ta), .taps_b(tb_), .osc_run, .de, .de_valid, .offset);

  always @(posedge clk) if (de_valid) n_valid++;

  function automatic int cnt_of(real f);
    return $floor(192.0 * 8.0 * f / 1000.0);
  endfunction
  function automatic bit near_int(real f);
    real x; x = 192.0 * 8.0 * f / 1000.0;
    return (x - $floor(x) < 0.02) || (x - $floor(x) > 0.98);
  endfunction

  // run one full sample with the given biases; return the code
  task automatic sample(output int code);
    @(posedge clk); while (phase3 != 3'd6) @(posedge clk);   // set during cycle 6
    @(posedge clk); while (!de_valid) @(posedge clk);
    code = de;
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (fa=%0.3f fb=%0.3f)", what, got, exp, fa, fb);
    end
  endtask

  initial begin
    int code, exp, raw_off, nv0;
    fa = 100.0; fb = 100.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    sample(code);
    for (int i = 0; i < 40; i++) begin
      do begin
        fa = 100.0 + real'($urandom_range(0, 6000)) / 100.0 - 30.0;
        fb = 100.0 + real'($urandom_range(0, 6000)) / 100.0 - 30.0;
      end while (near_int(fa) || near_int(fb));
      sample(code);
      chk("de", code, cnt_of(fa) - cnt_of(fb));
    end
    // offset calibration: a mismatch with zero input
    fa = 103.3; fb = 100.1;
    @(posedge clk); while (phase3 != 3'd6) @(posedge clk);
    cal = 1;
    repeat (24) @(posedge clk);
    cal = 0;
    raw_off = cnt_of(103.3) - cnt_of(100.1);
    chk("stored offset", int'(offset), raw_off);
    sample(code);
    chk("offset removed", code, 0);
    fa = 113.3; fb = 90.1;
    sample(code);
    chk("de after cal", code, cnt_of(fa) - cnt_of(fb) - raw_off);
    // resolution shift
    res_shift = 2;
    fa = 100.1; fb = 113.3;
    sample(code);
    exp = cnt_of(fa) - cnt_of(fb) - raw_off;
    chk("shift 2", code, exp >>> 2);
    res_shift = 0;
    // clipping
    fa = 250.1; fb = 60.1;
    sample(code);
    chk("clip high", code, 127);
    fa = 60.1; fb = 250.1;
    sample(code);
    chk("clip low", code, -128);
    // rate: one de_valid per 8 clocks
    nv0 = n_valid;
    repeat (80) @(posedge clk);
    chk("conversions in 80 cycles", n_valid - nv0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
