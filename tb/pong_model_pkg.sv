// pong_model_pkg: reference model of the ping-pong game for the testbenches.
//
// An untimed, integer-only restatement of the game rules: one call of
// frame_step() is one frame update (pads move, then the ball's direction is
// decided from the old positions and the ball moves), and pixel_rgb() gives
// the colour of one screen pixel for a given game state. The testbenches
// compare the hardware against these functions.
package pong_model_pkg;
  import pong_pkg::*;

  typedef struct {
    int ball_x, ball_y, pad_l, pad_r;
    int dx, dy;             // +1 / -1
    int score_l, score_r;
  } model_t;

  typedef struct {
    bit top, bottom, hit_l, hit_r, miss_l, miss_r;
  } model_evt_t;

  function automatic model_t model_reset(pong_geom_t g);
    model_t m;
    m.ball_x = g.ball_x0; m.ball_y = g.ball_y0;
    m.pad_l = g.pad_y0;   m.pad_r = g.pad_y0;
    m.dx = 1; m.dy = 1;
    m.score_l = 0; m.score_r = 0;
    return m;
  endfunction

  function automatic int pad_move(pong_geom_t g, int y, bit up, bit down);
    int n = y;
    if (up && !down) n = y - int'(g.pad_v);
    if (down && !up) n = y + int'(g.pad_v);
    if (n < 0) n = 0;
    if (n > int'(g.screen_h - g.pad_h)) n = g.screen_h - g.pad_h;
    return n;
  endfunction

  function automatic void frame_step(pong_geom_t g, ref model_t m, input bit lu, ld, ru, rd,
                                     output model_evt_t e);
    int v = g.ball_v, s = g.ball_size;
    int nx, ny;
    bit ov_l, ov_r;
    e = '{default: 0};
    // vertical: reverse if the next step would leave the screen
    ny = m.ball_y + m.dy * v;
    if (ny < 0) begin m.dy = 1; e.top = 1; end
    else if (ny + s > int'(g.screen_h)) begin m.dy = -1; e.bottom = 1; end
    // horizontal
    ov_l = (m.ball_y + s > m.pad_l) && (m.ball_y < m.pad_l + int'(g.pad_h));
    ov_r = (m.ball_y + s > m.pad_r) && (m.ball_y < m.pad_r + int'(g.pad_h));
    nx = m.ball_x + m.dx * v;
    if (m.dx < 0) begin
      // the step would carry the ball's left edge onto or past the pad face
      if (m.ball_x >= int'(g.pad_l_x + g.pad_w) && nx < int'(g.pad_l_x + g.pad_w) && ov_l) begin
        m.dx = 1; e.hit_l = 1;
      end else if (nx < int'(g.wall_l_x + g.wall_w)) begin
        m.dx = 1; e.miss_l = 1; m.score_r++;
      end
    end else begin
      if (m.ball_x + s <= int'(g.pad_r_x) && nx + s > int'(g.pad_r_x) && ov_r) begin
        m.dx = -1; e.hit_r = 1;
      end else if (nx + s > int'(g.wall_r_x)) begin
        m.dx = -1; e.miss_r = 1; m.score_l++;
      end
    end
    m.ball_x += m.dx * v;
    m.ball_y += m.dy * v;
    m.pad_l = pad_move(g, m.pad_l, lu, ld);
    m.pad_r = pad_move(g, m.pad_r, ru, rd);
    m.score_l &= 255;
    m.score_r &= 255;
  endfunction

  function automatic rgb_t pixel_rgb(pong_geom_t g, model_t m, int x, int y, bit vis);
    int s = g.ball_size;
    real cx, cy, r;
    if (!vis) return 8'h00;
    if ((x >= int'(g.wall_l_x) && x < int'(g.wall_l_x + g.wall_w)) ||
        (x >= int'(g.wall_r_x) && x < int'(g.wall_r_x + g.wall_w))) return 8'b000_000_11;
    if (x >= int'(g.pad_l_x) && x < int'(g.pad_l_x + g.pad_w) && y >= m.pad_l && y < m.pad_l + int'(g.pad_h))
      return 8'b000_111_00;
    if (x >= int'(g.pad_r_x) && x < int'(g.pad_r_x + g.pad_w) && y >= m.pad_r && y < m.pad_r + int'(g.pad_h))
      return 8'b000_111_00;
    // ball: pixel centre within radius s/2 of the box centre
    cx = (x - m.ball_x) + 0.5 - s / 2.0;
    cy = (y - m.ball_y) + 0.5 - s / 2.0;
    r  = s / 2.0;
    if (x >= m.ball_x && x < m.ball_x + s && y >= m.ball_y && y < m.ball_y + s &&
        cx * cx + cy * cy <= r * r) return 8'b111_000_00;
    return 8'h00;
  endfunction
endpackage
