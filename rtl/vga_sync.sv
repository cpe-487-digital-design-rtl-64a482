// vga_sync: 640x480 VGA raster timing.
//
// A column counter runs 0..H_TOTAL-1 (800) at the pixel rate; a line
// counter runs 0..V_TOTAL-1 (525) and advances once per line, at column
// V_ADV_COL (699). The active picture is columns 0..639 of lines 0..479.
// Horizontal sync is low for columns H_SYNC_FIRST..H_SYNC_LAST (659..755),
// vertical sync for lines V_SYNC_FIRST..V_SYNC_LAST (493..494). With a
// 25 MHz pixel rate this gives 31.25 kHz lines and a 59.5 Hz frame.
//
// Every output is registered on a pixel-rate clock edge: sync levels, the
// pixel address (pixel_col / pixel_row, the counters as they stood before
// the edge) and the colour, which is the colour input gated off outside the
// active picture. The colour input is expected to be a combinational
// function of pixel_col / pixel_row, so the colour registered at an edge is
// that of the pixel addressed in the previous cycle, and the blanking uses
// the counters of the current cycle, one pixel later. This one-pixel skew
// is part of the published design and is kept.
//
// The counter limits, the line-advance column and the sync windows follow
// the published design. The single 50 MHz clock with a pixel enable
// (instead of a divided clock) and the synchronous reset, which zeroes the
// counters and sets both syncs high, are this implementation's choices.
module vga_sync
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = SCREEN_W,  // 640
  parameter int unsigned H_TOTAL      = 800,
  parameter int unsigned H_SYNC_FIRST = 659,
  parameter int unsigned H_SYNC_LAST  = 755,
  parameter int unsigned V_ACTIVE     = SCREEN_H,  // 480
  parameter int unsigned V_TOTAL      = 525,
  parameter int unsigned V_SYNC_FIRST = 493,
  parameter int unsigned V_SYNC_LAST  = 494,
  parameter int unsigned V_ADV_COL    = 699
) (
  input  logic   clk,        // system clock
  input  logic   rst,        // synchronous, active high
  input  logic   pix_en,     // one pixel per enabled clock
  input  rgb_t   rgb_in,     // colour of the addressed pixel
  output rgb_t   rgb_out,    // registered, blanked colour to the monitor
  output logic   hsync,      // active low
  output logic   vsync,      // active low
  output coord_t pixel_row,
  output coord_t pixel_col
);

  coord_t h_cnt, v_cnt;
  logic   video_on;

  always_comb video_on = (h_cnt < coord_t'(H_ACTIVE)) && (v_cnt < coord_t'(V_ACTIVE));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_cnt     <= '0;
      v_cnt     <= '0;
      hsync     <= 1'b1;
      vsync     <= 1'b1;
      pixel_col <= '0;
      pixel_row <= '0;
      rgb_out   <= '0;
    end else if (pix_en) begin
      if (h_cnt >= coord_t'(H_TOTAL - 1)) h_cnt <= '0;
      else                                h_cnt <= h_cnt + 1'b1;

      hsync <= !((h_cnt >= coord_t'(H_SYNC_FIRST)) && (h_cnt <= coord_t'(H_SYNC_LAST)));

      if (h_cnt == coord_t'(V_ADV_COL)) begin
        if (v_cnt >= coord_t'(V_TOTAL - 1)) v_cnt <= '0;
        else                                v_cnt <= v_cnt + 1'b1;
      end

      vsync <= !((v_cnt >= coord_t'(V_SYNC_FIRST)) && (v_cnt <= coord_t'(V_SYNC_LAST)));

      pixel_col <= h_cnt;
      pixel_row <= v_cnt;
      rgb_out   <= video_on ? rgb_in : '0;
    end
  end

endmodule
