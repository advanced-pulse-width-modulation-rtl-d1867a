`timescale 1ns/1ps
// tb_dpwm_edge: two edge generators on one 32-tap ring (1 ns per tap, so one
// DPWM LSB is 1 ns). Generator A always has value 0, generator B sweeps every
// value 0..959 plus random ones. In each frame the time from A's toggle to
// B's toggle must be exactly B's value in ns, A must toggle 48 ns after the
// frame start, and each generator must toggle exactly once per frame.
module tb_dpwm_edge;
  import vr_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0;
  logic [31:0] taps;
  logic [4:0] cnt;
  dpwm_t vb;
  logic ta, tb_;
  real t_a, t_frame;
  dpwm_t v_lat;
  int n_frames = 0, n_a = 0, n_b = 0;

  ring_osc #(.M(32)) u_ring (.ibias_ua(31.25), .run(rst_n), .taps);

  always_ff @(posedge taps[0] or negedge rst_n)
    if (!rst_n) cnt <= '0; else cnt <= cnt + 1'b1;

  dpwm_edge u_a (.taps, .rst_n, .cnt, .frame_seg(5'd3), .value('0), .tgl(ta));
  dpwm_edge u_b (.taps, .rst_n, .cnt, .frame_seg(5'd3), .value(vb), .tgl(tb_));

  // frame start = X0 edge where cnt becomes 3; value latched at X8 of it
  always @(posedge taps[0]) if (rst_n && cnt == 5'd2) begin
    t_frame = $realtime;
    if (n_frames > 0) begin
      checks++;
      if (n_a != n_frames || n_b != n_frames) begin
        failures++;
        $display("FAIL frame %0d: toggles a=%0d b=%0d", n_frames, n_a, n_b);
      end
    end
  end
  always @(posedge taps[8]) if (rst_n && cnt == 5'd3) begin
    v_lat = vb;
    n_frames++;
  end
  always @(ta) if (rst_n) begin
    n_a++;
    t_a = $realtime;
    checks++;
    if ($realtime - t_frame != 48.0) begin
      failures++;
      $display("FAIL A latency %0.3f", $realtime - t_frame);
    end
  end
  always @(tb_) if (rst_n) begin
    #0.001;
    n_b++;
    checks++;
    if ($realtime - 0.001 - t_a != real'(v_lat)) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d measured %0.3f", v_lat, $realtime - 0.001 - t_a);
    end
  end

  initial begin
    vb = '0;
    #20 rst_n = 1'b1;
    for (int v = 0; v < 960 + 40; v++) begin
      @(posedge taps[0]); while (cnt != 5'd20) @(posedge taps[0]);
      vb <= (v < 960) ? dpwm_t'(v) : dpwm_t'($urandom_range(0, 959));
    end
    repeat (2) begin
      @(posedge taps[0]); while (cnt != 5'd20) @(posedge taps[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
