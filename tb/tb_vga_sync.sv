// tb_vga_sync: self-checking test of the VGA scan generator at 640x480.
//
// Runs the block with its default timing for two full frames and compares,
// on every clock, pix_tick, pixel_x, pixel_y, hsync, vsync and video_on with
// a reference scan written here from the 640x480@60 Hz numbers (800 pixels
// per line with sync on pixels 656..751, 525 lines with sync on lines
// 490..491). It also measures the frame period in clocks (2 * 800 * 525)
// and the number of visible pixels per frame (640 * 480).
`timescale 1ns/1ps
module tb_vga_sync;
  import pong_pkg::*;

  logic   clk = 1'b0, rst = 1'b1;
  logic   pix_tick, hsync, vsync, video_on;
  coord_t pixel_x, pixel_y;
  int     checks = 0, failures = 0;

  vga_sync dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d (t=%0t)", what, pixel_x, pixel_y, $time);
    end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  ref_h, ref_v, ref_tick;
  int  cycle, last_vs_fall, frame_cycles[$], visible;
  logic vs_prev;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ref_h = 0; ref_v = 0; ref_tick = 0;
    cycle = 0; last_vs_fall = -1; vs_prev = 1'b1; visible = 0;
    // two frames plus a margin
    while (frame_cycles.size() < 2 || cycle < 2 * 840_000 + 10) begin
      @(posedge clk);
      @(negedge clk);
      cycle++;
      // reference advances on the edge that followed a tick
      if (ref_tick == 1) begin
        if (ref_h == 799) begin
          ref_h = 0;
          ref_v = (ref_v == 524) ? 0 : ref_v + 1;
        end else ref_h++;
      end
      ref_tick ^= 1;
      check(pix_tick == ref_tick[0], "pix_tick");
      check(pixel_x == ref_h, "pixel_x");
      check(pixel_y == ref_v, "pixel_y");
      check(hsync == !(ref_h >= 656 && ref_h < 752), "hsync");
      check(vsync == !(ref_v >= 490 && ref_v < 492), "vsync");
      check(video_on == (ref_h < 640 && ref_v < 480), "video_on");
      if (video_on && pix_tick) visible++;
      if (vs_prev && !vsync) begin
        if (last_vs_fall >= 0) frame_cycles.push_back(cycle - last_vs_fall);
        last_vs_fall = cycle;
      end
      vs_prev = vsync;
      if (cycle == 840_000) begin
        check(visible == 640 * 480, "visible pixels per frame");
        $display("visible pixels in first frame: %0d", visible);
      end
    end
    foreach (frame_cycles[i]) begin
      check(frame_cycles[i] == 2 * 800 * 525, "frame period");
      $display("frame period: %0d clocks", frame_cycles[i]);
    end
    check(frame_cycles.size() >= 1, "saw a full frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
