// vga_sync: VGA scan generator with built-in clock-enable divider.
//
// The board clock runs at twice the pixel rate (50 MHz for a 25 MHz, 640x480
// monitor), so a mod-2 counter produces pix_tick, a one-cycle enable on every
// second clock. On each pix_tick the horizontal counter steps through
// display, front porch, sync pulse and back porch; at the end of a line the
// vertical counter steps in the same way. pixel_x/pixel_y are the counters
// themselves, video_on is high while both are inside the visible area, and
// hsync/vsync are low during the sync pulses.
//
// Timing: all outputs are registered. hsync, vsync and video_on are computed
// from the next counter values, so they change on the same clock edge as
// pixel_x/pixel_y and always describe the pixel those counters name. A pixel
// lasts two clocks. After reset the scan starts at pixel (0,0).
//
// The mod-2 divider, the 640x480 resolution and the signal set (pixel x/y,
// video_on, H-sync, V-sync) follow the design description. Porch and sync
// widths (standard 640x480@60 Hz: 800 clocks per line, 525 lines) and the
// negative sync polarity are this design's choice, set through TIMING.
module vga_sync
  import pong_pkg::*;
#(
  parameter vga_timing_t TIMING = VGA_640X480
) (
  input  logic   clk,
  input  logic   rst,       // synchronous, active high
  output logic   pix_tick,  // one clock in two: pixel enable
  output logic   hsync,     // active low
  output logic   vsync,     // active low
  output logic   video_on,
  output coord_t pixel_x,
  output coord_t pixel_y
);

  localparam int unsigned H_TOTAL = TIMING.h_display + TIMING.h_front + TIMING.h_sync + TIMING.h_back;
  localparam int unsigned V_TOTAL = TIMING.v_display + TIMING.v_front + TIMING.v_sync + TIMING.v_back;
  localparam int unsigned H_SYNC_START = TIMING.h_display + TIMING.h_front;
  localparam int unsigned V_SYNC_START = TIMING.v_display + TIMING.v_front;

  if (H_TOTAL > 2**COORD_W || V_TOTAL > 2**COORD_W) begin : gen_size_check
    $error("vga_sync: scan does not fit in COORD_W bits");
  end

  logic   mod2_q;
  coord_t h_q, v_q, h_d, v_d;

  // mod-2 counter: pix_tick on every second clock
  always_ff @(posedge clk) begin
    if (rst) mod2_q <= 1'b0;
    else     mod2_q <= ~mod2_q;
  end
  assign pix_tick = mod2_q;

  always_comb begin
    h_d = h_q;
    v_d = v_q;
    if (pix_tick) begin
      if (h_q == coord_t'(H_TOTAL - 1)) begin
        h_d = '0;
        v_d = (v_q == coord_t'(V_TOTAL - 1)) ? '0 : v_q + 1'b1;
      end else begin
        h_d = h_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h_q      <= '0;
      v_q      <= '0;
      hsync    <= 1'b1;
      vsync    <= 1'b1;
      video_on <= 1'b1;
    end else begin
      h_q      <= h_d;
      v_q      <= v_d;
      hsync    <= !(h_d >= coord_t'(H_SYNC_START) && h_d < coord_t'(H_SYNC_START + TIMING.h_sync));
      vsync    <= !(v_d >= coord_t'(V_SYNC_START) && v_d < coord_t'(V_SYNC_START + TIMING.v_sync));
      video_on <= (h_d < coord_t'(TIMING.h_display)) && (v_d < coord_t'(TIMING.v_display));
    end
  end

  assign pixel_x = h_q;
  assign pixel_y = v_q;

endmodule
