`timescale 1ns/1ps
// tb_integrator_array: random updates with random load codes against a
// reference model of 8 saturating integrators: only the integrator chosen
// by the top 3 bits of the load code moves, di_next = selected + din, the
// others hold; with load_all every integrator takes the new value; with sched_en low integrator 0 is always used; clear zeroes
// all.
module tb_integrator_array;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, update = 0, sched_en = 1, load_all = 0;
  logic [7:0] iout = 0;
  logic signed [15:0] din = 0, di_next;
  logic [2:0] sel;
  int model [8];
  always #5 clk = ~clk;

  integrator_array #(.NINT(8), .W(16)) dut (.clk, .rst_n, .clear, .update, .load_all, .sched_en,
    .iout, .din, .sel, .di_next);

  function automatic int sat(int x);
    return x > 32767 ? 32767 : (x < -32768 ? -32768 : x);
  endfunction

  initial begin
    int s, e;
    for (int i = 0; i < 8; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      if (t == 1500) sched_en <= 0;
      load_all <= (t % 300) < 10;
      iout   <= 8'($urandom);
      din    <= (t % 200 < 20) ? 16'sd30000 : 16'($signed($urandom_range(0, 400)) - 200);
      update <= ($urandom_range(0, 3) != 0);
      @(negedge clk);
      s = sched_en ? iout[7:5] : 0;
      e = sat(model[s] + din);
      checks++;
      if (sel != s || di_next != e) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sel=%0d/%0d di_next=%0d/%0d", t, sel, s, di_next, e);
      end
      @(posedge clk);
      if (update && load_all) for (int i = 0; i < 8; i++) model[i] = e;
      else if (update) model[s] = e;
    end
    clear <= 1; @(posedge clk); clear <= 0; update <= 0; sched_en <= 1;
    for (int i = 0; i < 8; i++) begin
      iout <= 8'(i << 5); din <= 0; @(negedge clk);
      checks++;
      if (di_next != 0) begin failures++; $display("FAIL clear"); end
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
