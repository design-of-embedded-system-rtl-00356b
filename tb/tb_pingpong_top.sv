// tb_pingpong_top: end-to-end game on a reduced 160x120 screen.
//
// pingpong_top is built with a small scan (184 x 128 clocks per line/frame
// pair of counts, 160x120 visible) and a playfield scaled to match, so that
// several hundred frames, enough for rallies, hits and misses on both
// sides, simulate quickly. pong_screen_checker plays the game through the
// buttons and checks every pixel, both syncs, and the scores; this module then requires each mechanism to have happened at least
// once.
`timescale 1ns/1ps
module tb_pingpong_top;
  import pong_pkg::*;

  localparam vga_timing_t T = '{h_display: 160, h_front: 4, h_sync: 12, h_back: 8,
                                v_display: 120, v_front: 2, v_sync: 2,  v_back: 4};
  localparam pong_geom_t G = '{screen_w: 160, screen_h: 120,
                               wall_l_x: 8,   wall_r_x: 148, wall_w: 4,
                               pad_l_x: 16,   pad_r_x: 140,  pad_w: 4, pad_h: 24, pad_v: 2,
                               ball_size: 8,  ball_v: 2,
                               ball_x0: 76,   ball_y0: 56,   pad_y0: 48};
  localparam int FRAMES = 700;

  logic       clk = 1'b0, rst = 1'b1;
  logic [3:0] btn;
  logic       hsync, vsync, done;
  rgb_t       rgb;
  logic [7:0] score_l, score_r;
  int         checks, failures, count [12];

  pingpong_top #(.TIMING(T), .GEOM(G)) dut (.*);

  pong_screen_checker #(.TIMING(T), .GEOM(G), .FRAMES(FRAMES)) u_chk (
    .clk, .rst, .hsync, .vsync, .rgb, .score_l, .score_r,
    .btn, .done, .checks, .failures, .count
  );

  always #10 clk = ~clk;

  localparam string NAMES [12] = '{"pad moved up", "pad moved down", "pad held at top",
    "pad held at bottom", "ball bounced off top", "ball bounced off bottom",
    "left pad hit", "right pad hit", "left miss", "right miss", "blanked pixels", "hsync pulses"};

  initial begin : watchdog
    repeat ((FRAMES + 3) * 2 * 184 * 128) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int fails;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (done);
    fails = failures;
    foreach (count[i]) begin
      $display("%-24s %0d", NAMES[i], count[i]);
      if (count[i] == 0) begin
        fails++;
        $display("FAIL mechanism never happened: %s", NAMES[i]);
      end
    end
    $display("final score %0d : %0d", score_l, score_r);
    if (score_l == 0 || score_r == 0) fails++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 13, fails);
    $finish;
  end
endmodule
