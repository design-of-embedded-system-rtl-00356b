// pong_pkg: types and constants shared by the ping-pong game blocks.
//
// Holds the VGA timing record, the playfield geometry record, the colour
// type and the per-frame event record. Defaults describe the 640x480 game:
// the resolution and the 50 MHz board clock halved to a 25 MHz pixel rate
// follow the design description; porch and sync widths are the common
// industry 640x480@60 Hz timing, and all object sizes, positions, speeds and
// colours are choices of this design.
package pong_pkg;

  // Width of every pixel coordinate and counter (covers 800 x 525).
  localparam int unsigned COORD_W = 10;
  typedef logic [COORD_W-1:0] coord_t;

  // 8-bit colour, RRRGGGBB.
  typedef logic [7:0] rgb_t;

  localparam rgb_t RGB_BLACK = 8'b000_000_00;
  localparam rgb_t RGB_WALL  = 8'b000_000_11;  // blue
  localparam rgb_t RGB_PAD   = 8'b000_111_00;  // green
  localparam rgb_t RGB_BALL  = 8'b111_000_00;  // red
  localparam rgb_t RGB_BACK  = 8'b000_000_00;  // black playfield

  // Horizontal and vertical scan timing, in pixels and lines.
  typedef struct packed {
    int unsigned h_display;
    int unsigned h_front;
    int unsigned h_sync;
    int unsigned h_back;
    int unsigned v_display;
    int unsigned v_front;
    int unsigned v_sync;
    int unsigned v_back;
  } vga_timing_t;

  localparam vga_timing_t VGA_640X480 = '{
    h_display: 640, h_front: 16, h_sync: 96, h_back: 48,
    v_display: 480, v_front: 10, v_sync: 2,  v_back: 33
  };

  // Playfield: screen size, two walls behind two pads, one square-bounded
  // round ball. x/y values are the left/top pixel of each object.
  typedef struct packed {
    int unsigned screen_w;
    int unsigned screen_h;
    int unsigned wall_l_x;   // left wall, columns wall_l_x .. +wall_w-1
    int unsigned wall_r_x;   // right wall
    int unsigned wall_w;
    int unsigned pad_l_x;    // left pad, columns pad_l_x .. +pad_w-1
    int unsigned pad_r_x;    // right pad
    int unsigned pad_w;
    int unsigned pad_h;
    int unsigned pad_v;      // pad speed, pixels per frame
    int unsigned ball_size;  // ball bounding box, pixels (square)
    int unsigned ball_v;     // ball speed per axis, pixels per frame
    int unsigned ball_x0;    // ball position after reset
    int unsigned ball_y0;
    int unsigned pad_y0;     // top of both pads after reset
  } pong_geom_t;

  localparam pong_geom_t GEOM_640X480 = '{
    screen_w: 640, screen_h: 480,
    wall_l_x: 32,  wall_r_x: 604, wall_w: 4,
    pad_l_x: 48,   pad_r_x: 588,  pad_w: 4, pad_h: 72, pad_v: 4,
    ball_size: 8,  ball_v: 2,
    ball_x0: 316,  ball_y0: 236,  pad_y0: 204
  };

  // Positions of the moving objects (top-left pixels).
  typedef struct packed {
    coord_t ball_x;
    coord_t ball_y;
    coord_t pad_l_y;
    coord_t pad_r_y;
  } obj_pos_t;

  // One-cycle flags raised on the frame update on which each event occurs.
  typedef struct packed {
    logic bounce_top;
    logic bounce_bottom;
    logic hit_l;     // ball returned by the left pad
    logic hit_r;     // ball returned by the right pad
    logic miss_l;    // ball reached the left wall: right player scores
    logic miss_r;    // ball reached the right wall: left player scores
  } game_evt_t;

endpackage
