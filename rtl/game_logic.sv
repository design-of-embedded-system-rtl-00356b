// game_logic: pad and ball movement, collisions and scoring, once per frame.
//
// The state (both pads' top rows, the ball's top-left corner, its two
// direction bits and both scores) changes only on the frame update, which is
// the pixel enable at pixel (x=0, y=screen_h+1): the scan has then finished
// the whole visible frame, so the picture never shows a half-moved object.
// At 60 frames per second this gives constant, frame-locked speeds.
//
// On each update:
//  * each pad moves pad_v pixels up or down while exactly one of its two
//    buttons is held, clamped to the top and bottom of the screen; x is fixed;
//  * the ball's direction is decided from the positions before the update:
//    the top and bottom edges reverse y; a pad whose face the ball would reach
//    in this step, with the two overlapping vertically, reverses x (hit);
//    a wall the ball would reach reverses x and gives the other player a
//    point (miss);
//  * the ball then moves ball_v pixels along each axis in its direction.
// evt reports, for one clock, what happened on that update.
//
// Following the design description: update at pix_y = 481, pix_x = 0; pads
// move only vertically at constant speed until they reach top or bottom; the
// ball keeps x/y and a positive or negative velocity, reversed by walls,
// pads, top and bottom; a player who misses gives the other player a point.
// This design's choices: sizes and speeds (GEOM), that a miss is the ball
// reaching the wall behind a pad and that play then continues, that both
// buttons held keeps the pad still, 8-bit wrapping scores, and the reset
// state (centred objects, ball moving right and down).
module game_logic
  import pong_pkg::*;
#(
  parameter pong_geom_t  GEOM    = GEOM_640X480,
  parameter int unsigned SCORE_W = 8
) (
  input  logic               clk,
  input  logic               rst,        // synchronous, active high
  input  logic               pix_tick,
  input  coord_t             pixel_x,
  input  coord_t             pixel_y,
  input  logic               l_up,
  input  logic               l_down,
  input  logic               r_up,
  input  logic               r_down,
  output obj_pos_t           pos,
  output logic [SCORE_W-1:0] score_l,
  output logic [SCORE_W-1:0] score_r,
  output game_evt_t          evt,
  output logic               refr_tick   // frame update strobe
);

  // Arithmetic is done in 12 bits so that sums near the screen edge cannot
  // wrap.
  typedef logic [COORD_W+1:0] wide_t;

  localparam wide_t SCREEN_H  = wide_t'(GEOM.screen_h);
  localparam wide_t PAD_H     = wide_t'(GEOM.pad_h);
  localparam wide_t PAD_V     = wide_t'(GEOM.pad_v);
  localparam wide_t PAD_Y_MAX = wide_t'(GEOM.screen_h - GEOM.pad_h);
  localparam wide_t BALL_S    = wide_t'(GEOM.ball_size);
  localparam wide_t BALL_V    = wide_t'(GEOM.ball_v);
  localparam wide_t WALL_L_IN = wide_t'(GEOM.wall_l_x + GEOM.wall_w);  // first column right of left wall
  localparam wide_t WALL_R_X  = wide_t'(GEOM.wall_r_x);
  localparam wide_t PAD_L_IN  = wide_t'(GEOM.pad_l_x + GEOM.pad_w);    // first column right of left pad
  localparam wide_t PAD_R_X   = wide_t'(GEOM.pad_r_x);

  wide_t     ball_x, ball_y, pad_l, pad_r;
  logic      dir_x_pos, dir_y_pos;              // 1: moving right / down
  wide_t     ball_x_n, ball_y_n, pad_l_n, pad_r_n;
  logic      dir_x_n, dir_y_n;
  game_evt_t evt_n;

  assign refr_tick = pix_tick && (pixel_x == '0) && (pixel_y == coord_t'(GEOM.screen_h + 1));

  function automatic wide_t move_pad(wide_t y, logic up, logic down);
    if (up && !down)      return (y > PAD_V) ? y - PAD_V : '0;
    else if (down && !up) return (y + PAD_V < PAD_Y_MAX) ? y + PAD_V : PAD_Y_MAX;
    else                  return y;
  endfunction

  function automatic logic overlaps_pad(wide_t by, wide_t py);
    return (by + BALL_S > py) && (by < py + PAD_H);
  endfunction

  always_comb begin
    evt_n   = '0;
    dir_x_n = dir_x_pos;
    dir_y_n = dir_y_pos;

    // top and bottom edges
    if (!dir_y_pos && ball_y < BALL_V) begin
      dir_y_n = 1'b1;
      evt_n.bounce_top = 1'b1;
    end else if (dir_y_pos && ball_y + BALL_S + BALL_V > SCREEN_H) begin
      dir_y_n = 1'b0;
      evt_n.bounce_bottom = 1'b1;
    end

    // pads, then the walls behind them
    if (!dir_x_pos) begin
      if (ball_x >= PAD_L_IN && ball_x < PAD_L_IN + BALL_V && overlaps_pad(ball_y, pad_l)) begin
        dir_x_n = 1'b1;
        evt_n.hit_l = 1'b1;
      end else if (ball_x < WALL_L_IN + BALL_V) begin
        dir_x_n = 1'b1;
        evt_n.miss_l = 1'b1;
      end
    end else begin
      if (ball_x + BALL_S <= PAD_R_X && ball_x + BALL_S + BALL_V > PAD_R_X && overlaps_pad(ball_y, pad_r)) begin
        dir_x_n = 1'b0;
        evt_n.hit_r = 1'b1;
      end else if (ball_x + BALL_S + BALL_V > WALL_R_X) begin
        dir_x_n = 1'b0;
        evt_n.miss_r = 1'b1;
      end
    end

    ball_x_n = dir_x_n ? ball_x + BALL_V : ball_x - BALL_V;
    ball_y_n = dir_y_n ? ball_y + BALL_V : ball_y - BALL_V;
    pad_l_n  = move_pad(pad_l, l_up, l_down);
    pad_r_n  = move_pad(pad_r, r_up, r_down);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ball_x    <= wide_t'(GEOM.ball_x0);
      ball_y    <= wide_t'(GEOM.ball_y0);
      pad_l     <= wide_t'(GEOM.pad_y0);
      pad_r     <= wide_t'(GEOM.pad_y0);
      dir_x_pos <= 1'b1;
      dir_y_pos <= 1'b1;
      score_l   <= '0;
      score_r   <= '0;
      evt       <= '0;
    end else begin
      evt <= '0;
      if (refr_tick) begin
        ball_x    <= ball_x_n;
        ball_y    <= ball_y_n;
        pad_l     <= pad_l_n;
        pad_r     <= pad_r_n;
        dir_x_pos <= dir_x_n;
        dir_y_pos <= dir_y_n;
        evt       <= evt_n;
        if (evt_n.miss_l) score_r <= score_r + 1'b1;
        if (evt_n.miss_r) score_l <= score_l + 1'b1;
      end
    end
  end

  assign pos.ball_x  = coord_t'(ball_x);
  assign pos.ball_y  = coord_t'(ball_y);
  assign pos.pad_l_y = coord_t'(pad_l);
  assign pos.pad_r_y = coord_t'(pad_r);

  // The ball and the pads stay on the screen.
  a_ball_on_screen: assert property (@(posedge clk) disable iff (rst)
    ball_y + BALL_S <= SCREEN_H && ball_x >= WALL_L_IN && ball_x + BALL_S <= WALL_R_X);
  a_pads_on_screen: assert property (@(posedge clk) disable iff (rst)
    pad_l <= PAD_Y_MAX && pad_r <= PAD_Y_MAX);

endmodule
