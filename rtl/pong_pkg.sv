// pong_pkg: types and screen constants shared by the PONG game blocks.
//
// The game draws on a 640x480 VGA raster. Screen coordinates are 10-bit
// unsigned numbers (coord_t), wide enough for the 800-column by 525-line
// raster that includes the blanking intervals. A pixel's colour travels
// between blocks as one bit per primary (rgb_t); the board's VGA connector
// takes only the most significant bit of each colour channel.
package pong_pkg;

  // One screen coordinate (column or row), unsigned.
  typedef logic [9:0] coord_t;

  // One bit per primary colour.
  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  // Visible area of the raster, in pixels.
  localparam int unsigned SCREEN_W = 640;
  localparam int unsigned SCREEN_H = 480;

endpackage
