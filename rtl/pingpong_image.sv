// pingpong_image: pixel generator for the ping-pong playfield.
//
// For the pixel named by pixel_x/pixel_y it decides which object, if any,
// covers it and outputs that object's colour. The walls are full-height
// columns, the pads are pad_w x pad_h rectangles at the positions given in
// pos, and the ball is round: inside its ball_size square a pixel is lit
// when, measured from the square's centre in half-pixel units,
// (2*col - (S-1))^2 + (2*row - (S-1))^2 <= S^2 (S = ball_size). For S = 8
// this is the usual 8x8 disc with its three corner pixels cut on each side.
// Overlaps are resolved wall, then pad, then ball. Outside the visible area
// (video_on low) the output is black, as the monitor requires during
// blanking.
//
// Timing: purely combinational; rgb is valid in the same clock as its inputs.
//
// The objects (left and right wall, left and right pad, a round ball) and the
// use of video_on and rgb follow the design description; colours, sizes and
// the disc formula are this design's choice.
module pingpong_image
  import pong_pkg::*;
#(
  parameter pong_geom_t GEOM = GEOM_640X480
) (
  input  logic     video_on,
  input  coord_t   pixel_x,
  input  coord_t   pixel_y,
  input  obj_pos_t pos,
  output rgb_t     rgb
);

  typedef logic [COORD_W+1:0] wide_t;

  localparam int S = int'(GEOM.ball_size);

  // Disc bitmap, bit row*S+col, worked out at elaboration.
  function automatic logic [S*S-1:0] disc_mask();
    logic [S*S-1:0] m;
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++)
        m[r*S+c] = ((2*c-(S-1))*(2*c-(S-1)) + (2*r-(S-1))*(2*r-(S-1))) <= S*S;
    return m;
  endfunction

  localparam logic [S*S-1:0] BALL_MASK = disc_mask();
  localparam int IDX_W = $clog2(S*S);

  wide_t x, y, col, row;
  logic  wall_on, pad_l_on, pad_r_on, ball_box_on, ball_on;

  assign x = wide_t'(pixel_x);
  assign y = wide_t'(pixel_y);

  always_comb begin
    wall_on  = (x >= wide_t'(GEOM.wall_l_x) && x < wide_t'(GEOM.wall_l_x + GEOM.wall_w)) ||
               (x >= wide_t'(GEOM.wall_r_x) && x < wide_t'(GEOM.wall_r_x + GEOM.wall_w));
    pad_l_on = (x >= wide_t'(GEOM.pad_l_x) && x < wide_t'(GEOM.pad_l_x + GEOM.pad_w)) &&
               (y >= wide_t'(pos.pad_l_y) && y < wide_t'(pos.pad_l_y) + wide_t'(GEOM.pad_h));
    pad_r_on = (x >= wide_t'(GEOM.pad_r_x) && x < wide_t'(GEOM.pad_r_x + GEOM.pad_w)) &&
               (y >= wide_t'(pos.pad_r_y) && y < wide_t'(pos.pad_r_y) + wide_t'(GEOM.pad_h));
    ball_box_on = (x >= wide_t'(pos.ball_x) && x < wide_t'(pos.ball_x) + wide_t'(S)) &&
                  (y >= wide_t'(pos.ball_y) && y < wide_t'(pos.ball_y) + wide_t'(S));
    col = x - wide_t'(pos.ball_x);
    row = y - wide_t'(pos.ball_y);
    ball_on = ball_box_on && BALL_MASK[IDX_W'(row*wide_t'(S) + col)];

    if (!video_on)                rgb = RGB_BLACK;
    else if (wall_on)             rgb = RGB_WALL;
    else if (pad_l_on || pad_r_on) rgb = RGB_PAD;
    else if (ball_on)             rgb = RGB_BALL;
    else                          rgb = RGB_BACK;
  end

endmodule
