// pong: single-player PONG on a VGA monitor, bat steered by a potentiometer.
//
// Data flow:
//   pong_timing  divides the 50 MHz clock: 25 MHz pixel enable, ADC serial
//                clock (1.5625 MHz) and chip select (low for 16 SCLKs out of
//                every 1024 system clocks, about 49 kHz sampling);
//   adc_if       collects the two channels' serial words into 12-bit values;
//                channel 2 carries the potentiometer voltage;
//   bat_scale    turns that value into a bat column (x 5/32);
//   bat_n_ball   moves the ball once per frame and tells, for each pixel
//                address, whether it shows the ball, the bat or background;
//   vga_sync     scans the 640x480 raster, produces the syncs and the pixel
//                address and blanks the colour outside the active area;
//   hit_counter  counts returns since the last serve for the LEDs.
// Each one-bit colour goes to the most significant bit of the board's VGA
// colour outputs; the lower bits are held at zero.
//
// Interface: clk_50MHz, rst (synchronous, active high), btn0 (serve), the
// ADC pins (ADC_CS, ADC_SCLK out; ADC_SDATA1/2 in), the VGA pins (3-bit red
// and green, 2-bit blue, hsync, vsync), sw (ball speed, used only with
// SPEED_FROM_SW) and led (hit count).
//
// The block structure, clock division, ADC use and pin widths follow the
// published design. The reset input, the single clock domain with enables,
// the two-flop synchroniser on the serve button, and the hit counter on
// the LEDs with the two exercise options as parameters (default off) are
// this implementation's additions.
module pong
  import pong_pkg::*;
#(
  parameter bit SPEED_FROM_SW = 1'b0,  // ball speed from sw[5:0]
  parameter bit SHRINK_BAT    = 1'b0   // double bat that shrinks per hit
) (
  input  logic       clk_50MHz,
  input  logic       rst,
  input  logic       btn0,        // serve
  input  logic [5:0] sw,          // ball speed in pixels per frame
  output logic       ADC_CS,
  output logic       ADC_SCLK,
  input  logic       ADC_SDATA1,
  input  logic       ADC_SDATA2,
  output logic [2:0] VGA_red,
  output logic [2:0] VGA_green,
  output logic [1:0] VGA_blue,
  output logic       VGA_hsync,
  output logic       VGA_vsync,
  output logic [7:0] led          // returns since the last serve
);

  logic        pix_en, sclk_fall, cs_rise;
  logic [11:0] ch1_value, adout;
  coord_t      batpos, pixel_row, pixel_col;
  coord_t      ball_x, ball_y, bat_w;
  rgb_t        colour, colour_out;
  logic        vsync, game_on, hit, serve_start;
  logic [1:0]  btn_sync;

  // The button is asynchronous to the clock.
  always_ff @(posedge clk_50MHz) begin
    if (rst) btn_sync <= '0;
    else     btn_sync <= {btn_sync[0], btn0};
  end

  pong_timing u_timing (
    .clk       (clk_50MHz),
    .rst       (rst),
    .pix_en    (pix_en),
    .adc_sclk  (ADC_SCLK),
    .adc_cs    (ADC_CS),
    .sclk_fall (sclk_fall),
    .cs_rise   (cs_rise)
  );

  adc_if u_adc (
    .clk       (clk_50MHz),
    .rst       (rst),
    .sclk_fall (sclk_fall),
    .cs        (ADC_CS),
    .cs_rise   (cs_rise),
    .sdata1    (ADC_SDATA1),
    .sdata2    (ADC_SDATA2),
    .data_1    (ch1_value),
    .data_2    (adout)
  );

  bat_scale u_scale (
    .adc_value (adout),
    .bat_x     (batpos)
  );

  bat_n_ball #(
    .SPEED_FROM_SW (SPEED_FROM_SW),
    .SHRINK_BAT    (SHRINK_BAT)
  ) u_game (
    .clk         (clk_50MHz),
    .rst         (rst),
    .v_sync      (vsync),
    .pixel_row   (pixel_row),
    .pixel_col   (pixel_col),
    .bat_x       (batpos),
    .serve       (btn_sync[1]),
    .speed_sw    (sw),
    .rgb         (colour),
    .game_on     (game_on),
    .ball_x      (ball_x),
    .ball_y      (ball_y),
    .bat_w       (bat_w),
    .hit         (hit),
    .serve_start (serve_start)
  );

  vga_sync u_vga (
    .clk       (clk_50MHz),
    .rst       (rst),
    .pix_en    (pix_en),
    .rgb_in    (colour),
    .rgb_out   (colour_out),
    .hsync     (VGA_hsync),
    .vsync     (vsync),
    .pixel_row (pixel_row),
    .pixel_col (pixel_col)
  );

  hit_counter #(.WIDTH(8)) u_hits (
    .clk   (clk_50MHz),
    .rst   (rst),
    .clear (serve_start),
    .inc   (hit),
    .count (led)
  );

  assign VGA_vsync = vsync;
  assign VGA_red   = {colour_out.r, 2'b00};
  assign VGA_green = {colour_out.g, 2'b00};
  assign VGA_blue  = {colour_out.b, 1'b0};

endmodule
