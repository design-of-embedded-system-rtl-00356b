// tb_pingpong_image: self-checking test of the pixel generator.
//
// For several object placements (reset positions, pads at both limits, the
// ball touching pads, walls and screen edges, random placements) every pixel
// of the 640x480 screen is presented with video_on high and its colour is
// compared with pong_model_pkg::pixel_rgb. A sample of pixels is also
// presented with video_on low and must be black. Finally the 8x8 ball is
// compared row by row with the expected disc:
// 00111100 / 01111110 / 11111111 x4 / 01111110 / 00111100.
`timescale 1ns/1ps
module tb_pingpong_image;
  import pong_pkg::*;
  import pong_model_pkg::*;

  localparam pong_geom_t G = GEOM_640X480;

  logic     video_on = 1'b0;
  coord_t   pixel_x = '0, pixel_y = '0;
  obj_pos_t pos;
  rgb_t     rgb;
  int       checks = 0, failures = 0;

  pingpong_image #(.GEOM(G)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at x=%0d y=%0d rgb=%b", what, pixel_x, pixel_y, rgb);
    end
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic place(input int bx, by, pl, pr, output model_t m);
    m = model_reset(G);
    m.ball_x = bx; m.ball_y = by; m.pad_l = pl; m.pad_r = pr;
    pos.ball_x = coord_t'(bx); pos.ball_y = coord_t'(by);
    pos.pad_l_y = coord_t'(pl); pos.pad_r_y = coord_t'(pr);
  endtask

  task automatic full_screen(input model_t m);
    video_on = 1'b1;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        pixel_x = coord_t'(x); pixel_y = coord_t'(y);
        #1 check(rgb == pixel_rgb(G, m, x, y, 1'b1), "visible pixel colour");
      end
    video_on = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      pixel_x = coord_t'($urandom_range(799)); pixel_y = coord_t'($urandom_range(524));
      #1 check(rgb == 8'h00, "black while video_on is low");
    end
  endtask

  localparam logic [7:0] DISC [8] = '{8'b00111100, 8'b01111110, 8'b11111111, 8'b11111111,
                                      8'b11111111, 8'b11111111, 8'b01111110, 8'b00111100};

  initial begin
    model_t m;
    #5;
    place(316, 236, 204, 204, m); full_screen(m);
    place(36, 0, 0, 408, m);      full_screen(m);   // ball at the left wall, top edge
    place(52, 100, 96, 0, m);     full_screen(m);   // ball on left pad face
    place(580, 472, 300, 408, m); full_screen(m);   // ball on right pad face, bottom edge
    place(596, 200, 408, 180, m); full_screen(m);   // ball at the right wall
    place(46, 120, 110, 200, m);  full_screen(m);   // ball overlapping the left pad
    for (int k = 0; k < 4; k++) begin
      place(36 + 2 * $urandom_range(279), 2 * $urandom_range(236),
            4 * $urandom_range(102), 4 * $urandom_range(102), m);
      full_screen(m);
    end
    // explicit ball shape
    place(300, 300, 0, 0, m);
    video_on = 1'b1;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        pixel_x = coord_t'(300 + c); pixel_y = coord_t'(300 + r);
        #1 check((rgb == RGB_BALL) == DISC[r][7-c], "ball disc shape");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
