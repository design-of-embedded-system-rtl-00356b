// pingpong_top: two-player ping-pong game on a VGA monitor, all in logic.
//
// Two pads, one per player, return a round ball between two walls; a player
// who lets the ball reach the wall behind their pad gives the other player a
// point. The players move their pads with push buttons.
//
// Structure: vga_sync halves the board clock into the pixel enable and scans
// the 640x480 screen; game_logic updates the pads, ball and scores once per
// frame, just after the last visible line; pingpong_image colours each pixel
// from the scan position and the object positions. The buttons pass through
// a two-flop synchroniser first. The scores are brought out as ports for an
// external score display.
//
// Interface: clk is the 50 MHz board clock, rst a synchronous active-high
// reset. btn = {button4, button3, button2, button1}: button4/button3 move the
// left pad up/down, button2/button1 the right pad. hsync and vsync are active
// low; rgb is RRRGGGBB and changes on the same clock edge as the scan
// position it belongs to (every second clock).
//
// Following the design description: the block split (VGA sync, pingpong
// image, game logic), 50 MHz halved to 25 MHz, 640x480, the button
// assignment. This design's choices: the synchroniser, the 8-bit colour
// port, the score ports and everything set by TIMING and GEOM beyond the
// resolution.
module pingpong_top
  import pong_pkg::*;
#(
  parameter vga_timing_t TIMING = VGA_640X480,
  parameter pong_geom_t  GEOM   = GEOM_640X480
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] btn,
  output logic       hsync,
  output logic       vsync,
  output rgb_t       rgb,
  output logic [7:0] score_l,
  output logic [7:0] score_r
);

  if (TIMING.h_display != GEOM.screen_w || TIMING.v_display != GEOM.screen_h) begin : gen_size_check
    $error("pingpong_top: GEOM screen size differs from TIMING");
  end
  if (TIMING.v_display + TIMING.v_front + TIMING.v_sync + TIMING.v_back < GEOM.screen_h + 2) begin : gen_update_check
    $error("pingpong_top: no line after the visible area for the frame update");
  end

  logic       pix_tick, video_on;
  coord_t     pixel_x, pixel_y;
  obj_pos_t   pos;
  logic [3:0] btn_meta, btn_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_meta <= '0;
      btn_sync <= '0;
    end else begin
      btn_meta <= btn;
      btn_sync <= btn_meta;
    end
  end

  vga_sync #(.TIMING(TIMING)) u_sync (
    .clk, .rst, .pix_tick, .hsync, .vsync, .video_on, .pixel_x, .pixel_y
  );

  game_logic #(.GEOM(GEOM), .SCORE_W(8)) u_game (
    .clk, .rst, .pix_tick, .pixel_x, .pixel_y,
    .l_up   (btn_sync[3]),
    .l_down (btn_sync[2]),
    .r_up   (btn_sync[1]),
    .r_down (btn_sync[0]),
    .pos, .score_l, .score_r,
    .evt       (),   // event flags and update strobe: for observation only
    .refr_tick ()
  );

  pingpong_image #(.GEOM(GEOM)) u_image (
    .video_on, .pixel_x, .pixel_y, .pos, .rgb
  );

endmodule
