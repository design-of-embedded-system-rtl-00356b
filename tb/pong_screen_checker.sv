// pong_screen_checker: plays the game against pingpong_top and checks every
// pixel it draws.
//
// It keeps its own scan position (one pixel every second clock from reset,
// counted from the timing numbers) and its own game state (pong_model_pkg).
// On every pixel it checks hsync and vsync, and the colour: black in
// blanking, otherwise the model's colour for that pixel. On the frame update
// (pixel 0 of line screen_h+1) it advances the model with the buttons it is
// holding and, one clock later, checks the score ports against it.
// It presses the buttons once per frame, at the start of vertical sync:
// first both pads up, then both down, then each pad follows the ball, and
// in the last two stretches of the run first the left, then the right
// player only presses random buttons, so that both players miss.
//
// It counts each mechanism: pad moves up and down, pads held at the top and
// bottom limits, ball bounces off top and bottom, hits and misses on each
// side, pixels blanked, sync pulses. done rises after FRAMES frames.
`timescale 1ns/1ps
module pong_screen_checker
  import pong_pkg::*;
  import pong_model_pkg::*;
#(
  parameter vga_timing_t TIMING = VGA_640X480,
  parameter pong_geom_t  GEOM   = GEOM_640X480,
  parameter int          FRAMES = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       hsync,
  input  logic       vsync,
  input  rgb_t       rgb,
  input  logic [7:0] score_l,
  input  logic [7:0] score_r,
  output logic [3:0] btn,
  output logic       done,
  output int         checks,
  output int         failures,
  output int         count [12]
);
  localparam int HT = TIMING.h_display + TIMING.h_front + TIMING.h_sync + TIMING.h_back;
  localparam int VT = TIMING.v_display + TIMING.v_front + TIMING.v_sync + TIMING.v_back;
  localparam int HS = TIMING.h_display + TIMING.h_front;
  localparam int VS = TIMING.v_display + TIMING.v_front;
  localparam int PAD_MAX = GEOM.screen_h - GEOM.pad_h;

  // count[] indices
  localparam int C_PAD_UP = 0, C_PAD_DOWN = 1, C_PAD_TOP = 2, C_PAD_BOT = 3, C_TOP = 4,
                 C_BOTTOM = 5, C_HIT_L = 6, C_HIT_R = 7, C_MISS_L = 8, C_MISS_R = 9,
                 C_BLANK = 10, C_HSYNC = 11;

  model_t     m;
  model_evt_t me;
  int   h, v, tick, frame, pend_evt;
  logic hs_prev;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at frame %0d x=%0d y=%0d (t=%0t)", what, frame, h, v, $time);
    end
  endtask

  function automatic bit [1:0] steer(int pad, int by, int skill);
    int pc = pad + GEOM.pad_h / 2, bc = by + GEOM.ball_size / 2;
    if ($urandom_range(99) < skill) begin
      if (pc > bc + GEOM.pad_h / 8) return 2'b10;
      if (pc < bc - GEOM.pad_h / 8) return 2'b01;
      return 2'b00;
    end
    return 2'($urandom_range(3));
  endfunction

  task automatic choose_buttons();
    bit [1:0] bl, br;
    int up_end = GEOM.pad_y0 / GEOM.pad_v + 4;
    int dn_end = up_end + PAD_MAX / GEOM.pad_v + 4;
    int track  = FRAMES - 2 * (FRAMES - dn_end) / 3;
    int l_off  = FRAMES - (FRAMES - dn_end) / 3;
    if (frame < up_end)      begin bl = 2'b10; br = 2'b10; end
    else if (frame < dn_end) begin bl = 2'b01; br = 2'b01; end
    else begin
      bl = steer(m.pad_l, m.ball_y, (frame >= track && frame < l_off) ? 0 : 90);
      br = steer(m.pad_r, m.ball_y, (frame >= l_off) ? 0 : 90);
    end
    btn = {bl, br};
  endtask

  initial begin
    btn = '0; done = 1'b0; checks = 0; failures = 0;
    foreach (count[i]) count[i] = 0;
    m = model_reset(GEOM);
    h = 0; v = 0; tick = 0; frame = 0; pend_evt = 0; hs_prev = 1'b1;
    // reset is released between clock edges; the next edge starts the scan
    // at (0,0) with the pixel enable low, the one after raises it
    wait (!rst);
    forever begin
      @(negedge clk);
      if (tick == 1) begin
        if (h == HT - 1) begin
          h = 0;
          v = (v == VT - 1) ? 0 : v + 1;
        end else h++;
      end
      tick ^= 1;
      if (pend_evt) begin
        check(score_l == 8'(m.score_l) && score_r == 8'(m.score_r), "score ports");
        pend_evt = 0;
      end
      if (tick == 1) begin
        bit vis;
        vis = (h < TIMING.h_display) && (v < TIMING.v_display);
        check(hsync == !(h >= HS && h < HS + TIMING.h_sync), "hsync");
        check(vsync == !(v >= VS && v < VS + TIMING.v_sync), "vsync");
        check(rgb == pixel_rgb(GEOM, m, h, v, vis), "pixel colour");
        if (!vis) count[C_BLANK]++;
        if (hs_prev && !hsync) count[C_HSYNC]++;
        hs_prev = hsync;
        if (h == 0 && v == VS) begin
          if (frame == FRAMES) begin
            done = 1'b1;
            break;
          end
          choose_buttons();
        end
        if (h == 0 && v == GEOM.screen_h + 1) begin
          // the design updates on the coming clock edge
          int old_l, old_r;
          old_l = m.pad_l;
          old_r = m.pad_r;
          frame_step(GEOM, m, btn[3], btn[2], btn[1], btn[0], me);
          pend_evt = 1;
          frame++;
          if (m.pad_l < old_l || m.pad_r < old_r) count[C_PAD_UP]++;
          if (m.pad_l > old_l || m.pad_r > old_r) count[C_PAD_DOWN]++;
          if ((btn[3] && !btn[2] && old_l == 0) || (btn[1] && !btn[0] && old_r == 0)) count[C_PAD_TOP]++;
          if ((btn[2] && !btn[3] && old_l == PAD_MAX) || (btn[0] && !btn[1] && old_r == PAD_MAX)) count[C_PAD_BOT]++;
          count[C_TOP]    += int'(me.top);
          count[C_BOTTOM] += int'(me.bottom);
          count[C_HIT_L]  += int'(me.hit_l);
          count[C_HIT_R]  += int'(me.hit_r);
          count[C_MISS_L] += int'(me.miss_l);
          count[C_MISS_R] += int'(me.miss_r);
        end
      end
    end
  end
endmodule
