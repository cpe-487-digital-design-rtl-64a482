// bat_n_ball: the PONG playfield -- ball and bat drawing and ball motion.
//
// Drawing (combinational, per pixel address):
//   * the ball is a disc: a pixel is lit when dx*dx + dy*dy < BSIZE*BSIZE,
//     with dx, dy the distances from the ball centre, and only while a game
//     is in play;
//   * the bat is a bar centred on (bat_x, BAT_Y), bat_w pixels either side
//     horizontally and BAT_H pixels either side vertically. Near the left
//     edge, where bat_x - bat_w would wrap below zero, the bar is drawn from
//     column 0;
//   * colours: white background, red ball, cyan bat (red off over the bat,
//     green and blue off over the ball).
//
// Motion (once per frame, on the rising edge of v_sync, sampled with clk):
//   * the ball moves by (x_motion, y_motion), each +speed or -speed
//     (two's complement, 10 bits); a move that would take a coordinate below
//     zero stops at zero;
//   * it bounces off the top (ball_y <= BSIZE), left (ball_x <= BSIZE) and
//     right (ball_x + BSIZE >= 640) walls, and off the bat when the ball's
//     box of half-size BSIZE/2 overlaps the bat's box;
//   * reaching the bottom (ball_y + BSIZE >= 480) ends the game: the ball is
//     hidden, parked at row SERVE_Y, and waits for serve; a serve restarts
//     it upward. The horizontal motion carries on while the ball is hidden.
//   All decisions of a frame use the values from before that frame's update,
//   so the ball moves once more with its old direction in the frame in
//   which a bounce is detected. The bat test overrides the wall tests.
//   The comparisons are made in 10-bit unsigned arithmetic that wraps, as
//   in the published design: near the left edge (bat_x < bat_w, or ball_x
//   < BSIZE/2) the bat test therefore fails.
//
// Options from the exercises of the published design, both off by default:
//   * SPEED_FROM_SW: the speed is taken from the switches, speed_sw
//     (values above MAX_SPEED = 32 are held at 32; 0 stops the ball, as the
//     exercise warns). A new speed takes effect at the next bounce.
//   * SHRINK_BAT: the bat starts at twice the half-width (2*BAT_W) and
//     loses one pixel of half-width per hit, down to 1; a miss restores it.
//
// Outputs hit and serve_start are one-clock pulses at the frame update: hit
// when the bat turns a falling ball (counted once per bounce even though the
// overlap lasts several frames), serve_start when a serve starts a game.
//
// The geometry, colours, speeds and bounce rules follow the published
// design. The single clock with a detected v_sync edge, the synchronous
// reset (which loads the published power-up values: ball at (320,240),
// moving +speed both ways, no game), the clamp of the switch speed, the
// hit rule and the half-width reading of "bat width" are this
// implementation's choices.
module bat_n_ball
  import pong_pkg::*;
#(
  parameter int unsigned BSIZE         = 8,    // ball radius, pixels
  parameter int unsigned BAT_W         = 20,   // bat half-width, pixels
  parameter int unsigned BAT_H         = 3,    // bat half-height, pixels
  parameter int unsigned BAT_Y         = 400,  // bat centre row
  parameter int unsigned BALL_SPEED    = 6,    // pixels per frame
  parameter int unsigned BALL_X0       = 320,  // position after reset
  parameter int unsigned BALL_Y0       = 240,
  parameter int unsigned SERVE_Y       = 440,  // row of the ball between games
  parameter bit          SPEED_FROM_SW = 1'b0, // exercise (a)
  parameter int unsigned MAX_SPEED     = 32,
  parameter bit          SHRINK_BAT    = 1'b0  // exercise (b)
) (
  input  logic       clk,
  input  logic       rst,          // synchronous, active high
  input  logic       v_sync,       // frame timing, rising edge = new frame
  input  coord_t     pixel_row,
  input  coord_t     pixel_col,
  input  coord_t     bat_x,        // bat centre column
  input  logic       serve,        // start a game when none is in play
  input  logic [5:0] speed_sw,     // switch speed, used with SPEED_FROM_SW
  output rgb_t       rgb,          // colour of pixel (pixel_col, pixel_row)
  output logic       game_on,      // a ball is in play
  output coord_t     ball_x,       // ball centre
  output coord_t     ball_y,
  output coord_t     bat_w,        // current bat half-width
  output logic       hit,          // pulse: ball returned by the bat
  output logic       serve_start   // pulse: a serve started a game
);

  localparam coord_t BSZ   = coord_t'(BSIZE);
  localparam coord_t BSZ_2 = coord_t'(BSIZE / 2);
  localparam coord_t BAT_T = coord_t'(BAT_Y - BAT_H);  // bat top row
  localparam coord_t BAT_B = coord_t'(BAT_Y + BAT_H);  // bat bottom row
  localparam coord_t BAT_W0 = SHRINK_BAT ? coord_t'(2 * BAT_W) : coord_t'(BAT_W);

  // ---------------------------------------------------------------- speed
  coord_t speed, neg_speed;

  always_comb begin
    if (SPEED_FROM_SW)
      speed = (speed_sw > 6'(MAX_SPEED)) ? coord_t'(MAX_SPEED) : coord_t'(speed_sw);
    else
      speed = coord_t'(BALL_SPEED);
    neg_speed = -speed;
  end

  // --------------------------------------------------------------- drawing
  coord_t      vx, vy;
  logic [20:0] dist2;
  logic        ball_on, bat_on;
  coord_t      bat_left, bat_right;

  always_comb begin
    vx    = (pixel_col <= ball_x) ? ball_x - pixel_col : pixel_col - ball_x;
    vy    = (pixel_row <= ball_y) ? ball_y - pixel_row : pixel_row - ball_y;
    dist2 = 21'(vx * vx) + 21'(vy * vy);
    ball_on = game_on && (dist2 < 21'(BSIZE * BSIZE));

    bat_left  = bat_x - bat_w;   // wraps when bat_x < bat_w
    bat_right = bat_x + bat_w;
    bat_on = ((pixel_col >= bat_left) || (bat_x <= bat_w)) &&
             (pixel_col <= bat_right) &&
             (pixel_row >= BAT_T) && (pixel_row <= BAT_B);

    rgb.r = ~bat_on;
    rgb.g = ~ball_on;
    rgb.b = ~ball_on;
  end

  // ---------------------------------------------------------------- motion
  logic   vs_q, frame;
  coord_t x_motion, y_motion;
  coord_t x_motion_n, y_motion_n, ball_x_n, ball_y_n, bat_w_n;
  logic   game_on_n, bat_contact;
  logic [10:0] x_sum, y_sum;

  assign frame = v_sync & ~vs_q;

  always_comb begin
    x_motion_n = x_motion;
    y_motion_n = y_motion;
    game_on_n  = game_on;

    // vertical: serve, top wall, bottom (miss)
    if (serve && !game_on) begin
      game_on_n  = 1'b1;
      y_motion_n = neg_speed;
    end else if (ball_y <= BSZ) begin
      y_motion_n = speed;
    end else if (coord_t'(ball_y + BSZ) >= coord_t'(SCREEN_H)) begin
      y_motion_n = neg_speed;
      game_on_n  = 1'b0;
    end

    // horizontal: right and left walls
    if (coord_t'(ball_x + BSZ) >= coord_t'(SCREEN_W)) x_motion_n = neg_speed;
    else if (ball_x <= BSZ)                            x_motion_n = speed;

    // bat: overlap of the ball's and the bat's boxes
    bat_contact = (coord_t'(ball_x + BSZ_2) >= bat_left) &&
                  (coord_t'(ball_x - BSZ_2) <= bat_right) &&
                  (coord_t'(ball_y + BSZ_2) >= BAT_T) &&
                  (coord_t'(ball_y - BSZ_2) <= BAT_B);
    if (bat_contact) y_motion_n = neg_speed;

    // position: one extra bit catches a move below zero
    y_sum = {1'b0, ball_y} + {y_motion[9], y_motion};
    x_sum = {1'b0, ball_x} + {x_motion[9], x_motion};
    if (!game_on)      ball_y_n = coord_t'(SERVE_Y);
    else if (y_sum[10]) ball_y_n = '0;
    else               ball_y_n = y_sum[9:0];
    ball_x_n = x_sum[10] ? '0 : x_sum[9:0];

    // bat width (exercise b): shrink on a hit, restore on a miss
    bat_w_n = bat_w;
    if (SHRINK_BAT) begin
      if (game_on && !game_on_n)                        bat_w_n = BAT_W0;
      else if (bat_contact && game_on && !y_motion[9] && bat_w > 1) bat_w_n = bat_w - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vs_q        <= 1'b1;
      game_on     <= 1'b0;
      ball_x      <= coord_t'(BALL_X0);
      ball_y      <= coord_t'(BALL_Y0);
      x_motion    <= speed;
      y_motion    <= speed;
      bat_w       <= BAT_W0;
      hit         <= 1'b0;
      serve_start <= 1'b0;
    end else begin
      vs_q        <= v_sync;
      hit         <= 1'b0;
      serve_start <= 1'b0;
      if (frame) begin
        game_on     <= game_on_n;
        ball_x      <= ball_x_n;
        ball_y      <= ball_y_n;
        x_motion    <= x_motion_n;
        y_motion    <= y_motion_n;
        bat_w       <= bat_w_n;
        hit         <= bat_contact && game_on && !y_motion[9];
        serve_start <= serve && !game_on;
      end
    end
  end

endmodule
