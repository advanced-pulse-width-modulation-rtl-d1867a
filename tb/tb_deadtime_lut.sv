`timescale 1ns/1ps
// tb_deadtime_lut: before any write every load code reads the register
// defaults; after random byte writes each load code reads its written
// entry pair (byte 2a = turn-on, 2a+1 = turn-off deadtime, a = load code
// top 6 bits) and unwritten bytes keep the defaults. Read and write clocks
// are unrelated.
module tb_deadtime_lut;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, rst_n = 0, we = 0, rd_en = 0;
  logic [6:0] waddr = 0;
  logic [7:0] wdata = 0, iout = 0;
  td_t td_on_def = 10, td_off_def = 12, td_on, td_off;
  int model [128];
  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;

  deadtime_lut dut (.wclk, .rst_n, .we, .waddr, .wdata, .rclk, .rd_en, .iout,
                    .td_on_def, .td_off_def, .td_on, .td_off);

  task automatic rd_chk(int code);
    int a, eon, eoff;
    @(posedge rclk); iout <= 8'(code); rd_en <= 1;
    @(posedge rclk); rd_en <= 0; #1;
    a = code >> 2;
    eon  = model[2*a]   < 0 ? int'(td_on_def)  : model[2*a];
    eoff = model[2*a+1] < 0 ? int'(td_off_def) : model[2*a+1];
    checks++;
    if (td_on != eon || td_off != eoff) begin
      failures++;
      if (failures < 10) $display("FAIL code=%0d got %0d/%0d exp %0d/%0d", code, td_on, td_off, eon, eoff);
    end
    @(posedge rclk); #1;
    checks++;
    if (td_on != eon) begin failures++; $display("FAIL hold without rd_en"); end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) model[i] = -1;
    repeat (2) @(posedge wclk);
    rst_n <= 1;
    for (int c = 0; c < 256; c += 4) rd_chk(c);
    for (int w = 0; w < 90; w++) begin
      @(negedge wclk);
      waddr = 7'($urandom); wdata = 8'($urandom);
      we = 1; model[waddr] = wdata;
      @(negedge wclk); we = 0;
    end
    for (int c = 0; c < 256; c++) rd_chk(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
