`timescale 1ns/1ps
// tb_microwire_regs: a MICROWIRE master model clocks 24-bit frames
// (write flag, 7-bit address, 16-bit data, MSB first) at SK = clk/16.
// Checks reset defaults by read-back, random write/read-back of every
// control register, LUT byte writes (one lut_we pulse with the frame's
// address and data), monitor reads and that a short (aborted) frame
// changes nothing.
module tb_microwire_regs;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cs_n = 1, sk = 0, si = 0, so;
  ctrl_regs_t regs;
  logic lut_we;
  logic [6:0] lut_waddr;
  logic [7:0] lut_wdata;
  logic [3:0][15:0] mon = '{16'h1234, 16'hBEEF, 16'h0F0F, 16'hA5A5};
  int nwe = 0;
  logic [6:0] last_wa;
  logic [7:0] last_wd;
  always #5 clk = ~clk;
  always @(posedge clk) if (lut_we) begin nwe++; last_wa = lut_waddr; last_wd = lut_wdata; end

  microwire_regs dut (.clk, .rst_n, .cs_n, .sk, .si, .so, .regs, .lut_we, .lut_waddr,
                      .lut_wdata, .mon);

  task automatic frame(input bit wr, input logic [6:0] a, input logic [15:0] d,
                       output logic [15:0] rd, input int nbits = 24);
    logic [23:0] f;
    f = {wr, a, d};
    rd = '0;
    cs_n = 0; repeat (8) @(posedge clk);
    for (int i = 0; i < nbits; i++) begin
      si = f[23 - i];
      repeat (8) @(posedge clk); sk = 1;
      if (i >= 8) rd = {rd[14:0], so};
      repeat (8) @(posedge clk); sk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (16) @(posedge clk);
  endtask

  function automatic int width(int a);
    case (a)
      0: return 3; 1, 2, 3, 4, 5: return GAIN_BITS; 6: return DUTY_BITS; 7: return 3;
      8, 9, 10, 11: return COARSE_BITS; 12: return NPHASE; 15: return 4; default: return TD_BITS;
    endcase
  endfunction

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] rd, v;
    logic [15:0] shadow [16];
    logic [15:0] defs [16] = '{16'd7, 16'd128, 16'd1, 16'd768, 16'd1, 16'd4, 16'd40, 16'd0,
                               16'd0, 16'd8, 16'd16, 16'd24, 16'hF, 16'd10, 16'd10, 16'd4};
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int a = 0; a < 16; a++) begin
      frame(0, 7'(a), 16'h0, rd);
      chk($sformatf("default reg %0d", a), rd, defs[a]);
      shadow[a] = defs[a];
    end
    for (int n = 0; n < 60; n++) begin
      int a;
      a = $urandom_range(0, 15);
      v = 16'($urandom) & ((16'd1 << width(a)) - 1);
      frame(1, 7'(a), v, rd);
      shadow[a] = v;
      frame(0, 7'(a), 16'h0, rd);
      chk($sformatf("readback reg %0d", a), rd, v);
    end
    chk("struct kp", 16'(regs.kp), shadow[1]);
    chk("struct dmin", 16'(regs.dmin), shadow[6]);
    chk("struct phase_off3", 16'(regs.phase_offset[3]), shadow[11]);
    for (int n = 0; n < 10; n++) begin
      int nwe0;
      nwe0 = nwe;
      v = 16'($urandom) & 16'h7FFF;
      frame(1, 7'd16, v, rd);
      chk("lut_we once", 16'(nwe - nwe0), 16'd1);
      chk("lut addr", 16'(last_wa), 16'(v[14:8]));
      chk("lut data", 16'(last_wd), 16'(v[7:0]));
    end
    for (int m = 0; m < 4; m++) begin
      frame(0, 7'(32 + m), 16'h0, rd);
      chk($sformatf("monitor %0d", m), rd, mon[m]);
    end
    frame(1, 7'd1, 16'h3FF, rd, 20);
    frame(0, 7'd1, 16'h0, rd);
    chk("aborted frame ignored", rd, shadow[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
