`timescale 1ns/1ps
// microwire_regs: MICROWIRE/SPI slave and control register file of the
// regulation loop.
//
// The embedded microcontroller (or, on the test board, an external host)
// programs the loop through its MICROWIRE port: PID gains, soft-start gain,
// feedforward gain, pulse-skipping threshold, ADC resolution, phase offsets
// and enables, default deadtimes and the deadtime table. It also reads back
// monitored values (error code, duty command, load current, start-up
// state). Every register resets to a working default (the prototype's
// K_P = 32, K_I = 0.25, K_D = 192, four phases at 90 degrees), so the
// controller regulates with no processor present.
//
// Frame (mode 0, MSB first, 24 bits while cs_n is low): bit 23 = 1 for a
// write, bits 22:16 register address, bits 15:0 data. A write takes effect
// when cs_n rises after exactly 24 bits. For a read, the slave drives data
// bits 15..0 on so during the last 16 bits. sk, cs_n and si are sampled by
// clk through two flip-flops, so sk must be slower than clk/4.
//
// Map: 0 ctrl {sched_en, ff_en, enable}; 1 kp; 2 ki; 3 kd; 4 kss; 5 kff
// (gains Q8.2); 6 dmin; 7 res_shift; 8..11 phase offsets; 12 phase enables;
// 13 td_on default; 14 td_off default; 15 soft-start step (ramp_step);
// 16 deadtime table byte write
// {byte address[14:8], byte[7:0]}; 32..35 monitor inputs (read only). The
// frame format and the map are this design's choices.
module microwire_regs
  import vr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cs_n,
  input  logic              sk,
  input  logic              si,
  output logic              so,
  output ctrl_regs_t        regs,
  output logic              lut_we,
  output logic [6:0]        lut_waddr,
  output logic [7:0]        lut_wdata,
  input  logic [3:0][15:0]  mon
);

  logic [2:0] sk_s, cs_s;
  logic [1:0] si_s;
  logic       sk_rise, sk_fall, cs_rise, active;
  logic [23:0] sh;
  logic [4:0]  nbit;
  logic [15:0] rsh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sk_s <= '0;
      cs_s <= '1;
      si_s <= '0;
    end else begin
      sk_s <= {sk_s[1:0], sk};
      cs_s <= {cs_s[1:0], cs_n};
      si_s <= {si_s[0], si};
    end
  end

  assign active  = !cs_s[1];
  assign sk_rise = active &&  sk_s[1] && !sk_s[2];
  assign sk_fall = active && !sk_s[1] &&  sk_s[2];
  assign cs_rise =  cs_s[1] && !cs_s[2];
  assign so      = rsh[15];

  function automatic logic [15:0] read_reg(input logic [6:0] a, input ctrl_regs_t r,
                                           input logic [3:0][15:0] m);
    logic [15:0] d;
    d = '0;
    unique case (a)
      7'd0:  d = {13'd0, r.sched_en, r.ff_en, r.enable};
      7'd1:  d = 16'(r.kp);
      7'd2:  d = 16'(r.ki);
      7'd3:  d = 16'(r.kd);
      7'd4:  d = 16'(r.kss);
      7'd5:  d = 16'(r.kff);
      7'd6:  d = 16'(r.dmin);
      7'd7:  d = 16'(r.res_shift);
      7'd8:  d = 16'(r.phase_offset[0]);
      7'd9:  d = 16'(r.phase_offset[1]);
      7'd10: d = 16'(r.phase_offset[2]);
      7'd11: d = 16'(r.phase_offset[3]);
      7'd12: d = 16'(r.phase_en);
      7'd13: d = 16'(r.td_on_def);
      7'd14: d = 16'(r.td_off_def);
      7'd15: d = 16'(r.ramp_step);
      7'd32: d = m[0];
      7'd33: d = m[1];
      7'd34: d = m[2];
      7'd35: d = m[3];
      default: d = '0;
    endcase
    return d;
  endfunction

  logic [23:0] sh_next;
  assign sh_next = {sh[22:0], si_s[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      nbit      <= '0;
      rsh       <= '0;
      lut_we    <= 1'b0;
      lut_waddr <= '0;
      lut_wdata <= '0;
      regs.enable       <= 1'b1;
      regs.ff_en        <= 1'b1;
      regs.sched_en     <= 1'b1;
      regs.kp           <= gain_t'(32 * 4);
      regs.ki           <= gain_t'(1);        // 0.25
      regs.kd           <= gain_t'(192 * 4);
      regs.kss          <= gain_t'(1);        // 0.25
      regs.kff          <= gain_t'(4);        // 1.0
      regs.dmin         <= duty_t'(40);
      regs.res_shift    <= '0;
      regs.phase_offset <= {5'd24, 5'd16, 5'd8, 5'd0};
      regs.phase_en     <= '1;
      regs.td_on_def    <= td_t'(10);
      regs.td_off_def   <= td_t'(10);
      regs.ramp_step    <= 4'd4;
    end else begin
      lut_we <= 1'b0;
      if (!active) begin
        nbit <= '0;
      end else if (sk_rise) begin
        sh <= sh_next;
        if (nbit != 5'd31) nbit <= nbit + 1'b1;
        if (nbit == 5'd7) rsh <= read_reg(sh_next[6:0], regs, mon);
      end else if (sk_fall && nbit >= 5'd9) begin
        rsh <= {rsh[14:0], 1'b0};
      end
      if (cs_rise && nbit == 5'd24 && sh[23]) begin
        unique case (sh[22:16])
          7'd0:  {regs.sched_en, regs.ff_en, regs.enable} <= sh[2:0];
          7'd1:  regs.kp  <= sh[GAIN_BITS-1:0];
          7'd2:  regs.ki  <= sh[GAIN_BITS-1:0];
          7'd3:  regs.kd  <= sh[GAIN_BITS-1:0];
          7'd4:  regs.kss <= sh[GAIN_BITS-1:0];
          7'd5:  regs.kff <= sh[GAIN_BITS-1:0];
          7'd6:  regs.dmin <= sh[DUTY_BITS-1:0];
          7'd7:  regs.res_shift <= sh[2:0];
          7'd8:  regs.phase_offset[0] <= sh[COARSE_BITS-1:0];
          7'd9:  regs.phase_offset[1] <= sh[COARSE_BITS-1:0];
          7'd10: regs.phase_offset[2] <= sh[COARSE_BITS-1:0];
          7'd11: regs.phase_offset[3] <= sh[COARSE_BITS-1:0];
          7'd12: regs.phase_en <= sh[NPHASE-1:0];
          7'd13: regs.td_on_def  <= sh[TD_BITS-1:0];
          7'd14: regs.td_off_def <= sh[TD_BITS-1:0];
          7'd15: regs.ramp_step  <= sh[3:0];
          7'd16: begin
            lut_we    <= 1'b1;
            lut_waddr <= sh[14:8];
            lut_wdata <= sh[7:0];
          end
          default: ;
        endcase
      end
    end
  end

endmodule
