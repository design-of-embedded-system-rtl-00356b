// tb_pingpong_top_full: the game at full 640x480 size, all defaults.
//
// pingpong_top is built with no parameter overrides (640x480, 50 MHz clock
// with a 25 MHz pixel rate). pong_screen_checker holds both "up" buttons for
// the first frames, then "down", and checks every pixel, both syncs and the
// scores of each of 60 complete frames (50.4 million pixel clocks) against
// the reference model. The pads must travel up to the top limit and stay
// there, and the frame period must be 2 * 800 * 525 clocks.
`timescale 1ns/1ps
module tb_pingpong_top_full;
  import pong_pkg::*;

  localparam int FRAMES = 60;

  logic       clk = 1'b0, rst = 1'b1;
  logic [3:0] btn;
  logic       hsync, vsync, done;
  rgb_t       rgb;
  logic [7:0] score_l, score_r;
  int         checks, failures, count [12];

  pingpong_top dut (.*);

  pong_screen_checker #(.FRAMES(FRAMES)) u_chk (
    .clk, .rst, .hsync, .vsync, .rgb, .score_l, .score_r,
    .btn, .done, .checks, .failures, .count
  );

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat ((FRAMES + 3) * 2 * 800 * 525) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // frame period measured on vsync
  longint cyc = 0, last_fall = -1;
  int     periods = 0, bad_periods = 0;
  logic   vs_q = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    vs_q <= vsync;
    if (vs_q && !vsync) begin
      if (last_fall >= 0) begin
        periods <= periods + 1;
        if (cyc - last_fall != 2 * 800 * 525) bad_periods <= bad_periods + 1;
      end
      last_fall <= cyc;
    end
  end

  initial begin
    int fails;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (done);
    fails = failures + bad_periods;
    $display("frames=%0d pad up moves=%0d pad held at top=%0d blanked=%0d hsync pulses=%0d vsync periods=%0d",
             FRAMES, count[0], count[2], count[10], count[11], periods);
    if (count[0] == 0) fails++;
    if (count[2] == 0) fails++;
    if (count[10] == 0) fails++;
    if (periods < FRAMES - 2) fails++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 5, fails);
    $finish;
  end
endmodule
