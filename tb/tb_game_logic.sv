// tb_game_logic: self-checking test of the per-frame game update.
//
// Drives the scan position and pixel enable directly, so a frame update costs
// a few clocks. Each frame the two pads are steered by simple simulated
// players (first both held up, then both held down, to reach the screen
// limits; later each pad follows the ball most of the time and presses
// random buttons otherwise, and for a stretch each player in turn only
// presses random buttons). After every update the pad and ball positions,
// scores and event flags are compared with pong_model_pkg. Scan positions
// that are not the update point, and the update point without the pixel
// enable, must leave the state alone. Every event kind (top and bottom
// bounce, left and right hit, left and right miss) and both pad limits must
// occur at least once. The update strobe must come exactly one clock per
// frame.
`timescale 1ns/1ps
module tb_game_logic;
  import pong_pkg::*;
  import pong_model_pkg::*;

  localparam pong_geom_t G = GEOM_640X480;
  localparam int FRAMES = 6000;

  logic      clk = 1'b0, rst = 1'b1;
  logic      pix_tick = 1'b0;
  coord_t    pixel_x = '0, pixel_y = '0;
  logic      l_up = 0, l_down = 0, r_up = 0, r_down = 0;
  obj_pos_t  pos;
  logic [7:0] score_l, score_r;
  game_evt_t evt;
  logic      refr_tick;
  int        checks = 0, failures = 0;

  game_logic #(.GEOM(G), .SCORE_W(8)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (FRAMES * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  model_t     m;
  model_evt_t me;
  int n_top, n_bot, n_hit_l, n_hit_r, n_miss_l, n_miss_r, n_pad_top, n_pad_bot, n_strobe;

  always @(posedge clk) if (refr_tick) n_strobe++;

  function automatic bit [1:0] steer(int pad, int by, int skill);
    int pc = pad + G.pad_h / 2, bc = by + G.ball_size / 2;
    if ($urandom_range(99) < skill) begin
      if (pc > bc + 8) return 2'b10;
      if (pc < bc - 8) return 2'b01;
      return 2'b00;
    end
    return 2'($urandom_range(3));
  endfunction

  task automatic compare(input string when);
    check(pos.ball_x == m.ball_x && pos.ball_y == m.ball_y, {when, ": ball position"});
    check(pos.pad_l_y == m.pad_l && pos.pad_r_y == m.pad_r, {when, ": pad positions"});
    check(score_l == m.score_l && score_r == m.score_r, {when, ": scores"});
  endtask

  initial begin
    bit [1:0] bl, br;
    {n_top, n_bot, n_hit_l, n_hit_r, n_miss_l, n_miss_r, n_pad_top, n_pad_bot, n_strobe} = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m = model_reset(G);
    compare("after reset");
    for (int f = 0; f < FRAMES; f++) begin
      if (f < 60)        begin bl = 2'b10; br = 2'b10; end
      else if (f < 180)  begin bl = 2'b01; br = 2'b01; end
      else begin
        // in turn, one player stops following the ball
        bl = steer(m.pad_l, m.ball_y, (f >= 2500 && f < 4000) ? 0 : 90);
        br = steer(m.pad_r, m.ball_y, (f >= 4000) ? 0 : 90);
      end
      {l_up, l_down} = bl;
      {r_up, r_down} = br;
      // near misses of the update point: nothing may change
      @(negedge clk); pixel_x = 0; pixel_y = coord_t'(G.screen_h + 1); pix_tick = 1'b0;
      @(negedge clk); pixel_x = 1; pix_tick = 1'b1;
      @(negedge clk); pixel_x = 0; pixel_y = coord_t'(G.screen_h); pix_tick = 1'b1;
      @(negedge clk); pix_tick = 1'b0;
      check(evt == '0, "no event without an update");
      compare("between updates");
      // the update point
      pixel_x = 0; pixel_y = coord_t'(G.screen_h + 1); pix_tick = 1'b1;
      #1 check(refr_tick == 1'b1, "update strobe at x=0, y=screen_h+1");
      @(negedge clk); pix_tick = 1'b0; pixel_y = 0;
      frame_step(G, m, bl[1], bl[0], br[1], br[0], me);
      compare("after update");
      check(evt.bounce_top == me.top && evt.bounce_bottom == me.bottom, "y events");
      check(evt.hit_l == me.hit_l && evt.hit_r == me.hit_r, "hit events");
      check(evt.miss_l == me.miss_l && evt.miss_r == me.miss_r, "miss events");
      n_top += int'(me.top); n_bot += int'(me.bottom);
      n_hit_l += int'(me.hit_l); n_hit_r += int'(me.hit_r);
      n_miss_l += int'(me.miss_l); n_miss_r += int'(me.miss_r);
      if (m.pad_l == 0 || m.pad_r == 0) n_pad_top++;
      if (m.pad_l == int'(G.screen_h - G.pad_h) || m.pad_r == int'(G.screen_h - G.pad_h)) n_pad_bot++;
    end
    $display("frames=%0d top=%0d bottom=%0d hit_l=%0d hit_r=%0d miss_l=%0d miss_r=%0d pad_at_top=%0d pad_at_bottom=%0d score %0d:%0d",
             FRAMES, n_top, n_bot, n_hit_l, n_hit_r, n_miss_l, n_miss_r, n_pad_top, n_pad_bot, score_l, score_r);
    check(n_top > 0, "top bounce happened");
    check(n_bot > 0, "bottom bounce happened");
    check(n_hit_l > 0, "left pad hit happened");
    check(n_hit_r > 0, "right pad hit happened");
    check(n_miss_l > 0, "left miss happened");
    check(n_miss_r > 0, "right miss happened");
    check(n_pad_top > 0, "pad reached the top");
    check(n_pad_bot > 0, "pad reached the bottom");
    check(n_strobe == FRAMES, "one update strobe per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
