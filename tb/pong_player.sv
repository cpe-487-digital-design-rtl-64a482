// pong_player: testbench helper that watches the VGA output of the PONG
// design, rebuilds each frame's picture and plays the game through the
// potentiometer's ADC code and the serve button.
//
// Raster decoding: outputs change on every second clock. The pixel shown
// on the clock edge where hsync falls is column 658 of its line, and each
// later pixel edge adds one column. The line count is taken as 493 at the
// first hsync fall after vsync falls and advances at each hsync fall;
// columns 658..699 belong to that line, the other columns to the next one.
// Only columns 0..638 and lines 0..479 are examined.
//
// Per frame the helper finds the ball (green off) and bat (red off)
// pixels and checks: no other non-white pixel; the bat exactly covers
// lines 397..403 and columns bat_x - w .. bat_x + w (from column 0 when
// bat_x <= w), where bat_x = code/8 + code/32 and w the expected
// half-width; a fully visible ball has the 193 pixels of a radius-8 disc;
// the ball moves SPEED pixels per frame on each axis (less only when
// stopped at 0). At high speed the ball can pass wholly beyond the right
// edge for one frame; it must then reappear where it was last seen. From the motion it counts serves, top / left / right wall
// bounces, returns off the bat and misses, and checks the LED count at
// each return, each serve and each miss. It plays RALLIES rallies, giving
// up each after HITS returns, and then raises done.
module pong_player #(
  parameter int SPEED   = 6,   // pixels per frame
  parameter int BAT_W0  = 20,  // bat half-width at a serve
  parameter bit SHRINK  = 0,   // half-width drops by one per return
  parameter int HITS    = 1,   // returns per rally before giving up
  parameter int RALLIES = 2
) (
  input  logic        clk,
  input  logic [2:0]  red,
  input  logic [2:0]  green,
  input  logic [1:0]  blue,
  input  logic        hsync,
  input  logic        vsync,
  input  logic [7:0]  led,
  output logic [11:0] code,       // potentiometer reading to present
  output logic        btn,        // serve button
  output logic        done,
  output int          checks,
  output int          failures,
  output int          n_serve, n_hit, n_miss, n_top, n_left, n_right, n_bat_move
);

  // ------------------------------------------------------------ decoding
  logic hs_q = 1'b1, vs_q = 1'b1;
  int   phase = 0, col = 0, line = 0;
  bit   frame_ready = 0;

  // per-frame picture statistics
  int ball_n, ball_c0, ball_c1, ball_r0, ball_r1;
  int bat_n, bat_c0, bat_c1, bat_r0, bat_r1, bad_n;

  task automatic clear_stats();
    ball_n = 0; ball_c0 = 9999; ball_c1 = -1; ball_r0 = 9999; ball_r1 = -1;
    bat_n = 0;  bat_c0 = 9999;  bat_c1 = -1;  bat_r0 = 9999;  bat_r1 = -1;
    bad_n = 0;
  endtask

  initial clear_stats();

  always @(posedge clk) begin
    int c, r;
    logic pr, pg, pb;
    if (hs_q && !hsync) begin
      phase = 0;
      col   = 658;
      line  = line + 1;
    end
    if (vs_q && !vsync) begin
      line = 492;
      frame_ready = 1;
    end
    if (phase == 0) begin
      c = col % 800;
      r = (c >= 658 && c <= 699) ? line : line + 1;
      r = r % 525;
      pr = red[2]; pg = green[2]; pb = blue[1];
      if (c <= 638 && r <= 479) begin
        if (!pg) begin
          ball_n++;
          if (c < ball_c0) ball_c0 = c;
          if (c > ball_c1) ball_c1 = c;
          if (r < ball_r0) ball_r0 = r;
          if (r > ball_r1) ball_r1 = r;
        end
        if (!pr) begin
          bat_n++;
          if (c < bat_c0) bat_c0 = c;
          if (c > bat_c1) bat_c1 = c;
          if (r < bat_r0) bat_r0 = r;
          if (r > bat_r1) bat_r1 = r;
        end
        if (pg != pb || (pr && !pg && red[1:0] != 0) || green[1:0] != 0 || blue[0] != 0)
          bad_n++;
      end
      col = col + 1;
    end
    phase = phase ^ 1;
    hs_q = hsync;
    vs_q = vsync;
  end

  // ------------------------------------------------------------- playing
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int bat_of(input int k);
    return k / 8 + k / 32;
  endfunction

  function automatic int code_for(input int x);
    int k = (x * 32 + 4) / 5;
    return k > 4095 ? 4095 : (k < 0 ? 0 : k);
  endfunction

  initial begin
    int  frames, rally, rally_hits, bw, bx_exp, lo, hi;
    int  x, y, px, py, dx, dy, pdx, pdy, last_bat;
    bit  vis, pvis, ppvis, give_up, serving, hidden;
    checks = 0; failures = 0; done = 0;
    n_serve = 0; n_hit = 0; n_miss = 0; n_top = 0; n_left = 0; n_right = 0; n_bat_move = 0;
    code = 12'(code_for(100));
    btn  = 1'b0;
    rally = 0; rally_hits = 0; bw = BAT_W0; give_up = 0; serving = 0; hidden = 0;
    pvis = 0; ppvis = 0; px = 0; py = 0; pdx = 0; pdy = 0; x = 0; y = 0;
    last_bat = -1;
    frames = 0;
    while (!done) begin
      // wait for the end of a frame
      @(posedge clk iff frame_ready);
      frame_ready = 0;
      frames++;
      if (frames < 3) begin clear_stats(); continue; end  // first frame may be partial

      // ---- ball
      vis = ball_n > 0;
      if (vis) begin
        x = (ball_c0 == 0) ? ball_c1 - 7 : (ball_c1 >= 638 ? ball_c0 + 7 : (ball_c0 + ball_c1) / 2);
        y = (ball_r0 == 0) ? ball_r1 - 7 : (ball_r1 >= 479 ? ball_r0 + 7 : (ball_r0 + ball_r1) / 2);
        if (ball_c0 > 0 && ball_c1 < 638 && ball_r0 > 0 && ball_r1 < 479)
          check(ball_n == 193 && ball_c1 - ball_c0 == 14 && ball_r1 - ball_r0 == 14, "ball is a radius-8 disc");
      end
      if (vis && !pvis && hidden) begin
        // back from beyond the right edge: that was a right-wall bounce
        hidden = 0;
        n_right++;
        check(x == px, "ball returns from the right edge where it left");
        pdx = -SPEED;
      end else if (vis && !pvis) begin
        n_serve++;
        serving = 0;
        btn = 1'b0;
        rally_hits = 0;
        give_up = 0;
        check(y == 440, "served ball appears at line 440");
        check(led == 0, "LEDs cleared by the serve");
      end
      if (vis && pvis) begin
        dx = x - px;
        dy = y - py;
        check(dx == SPEED || dx == -SPEED || (x == 0 && dx <= 0), $sformatf("x step %0d", dx));
        check(dy == SPEED || dy == -SPEED || (y == 0 && dy <= 0), $sformatf("y step %0d", dy));
        if (ppvis) begin
          if (pdx > 0 && dx < 0) n_right++;
          if (pdx < 0 && dx > 0) n_left++;
          if (pdy < 0 && dy > 0) n_top++;
          // a step of 0 (held at the edge) keeps the previous direction
          if (dx == 0) dx = pdx;
          if (dy == 0) dy = pdy;
          if (pdy > 0 && dy < 0) begin
            n_hit++;
            rally_hits++;
            check(py >= 393 && py <= 403 + SPEED, "return happens at the bat");
            check(led == 8'(rally_hits), "LEDs count the returns");
            if (SHRINK) begin
              bw = BAT_W0 - rally_hits;
              check(bat_c1 - bat_c0 == 2 * bw || bat_c0 == 0 || bat_c1 == 638, "bat shrank by one pixel a side");
            end
            if (rally_hits >= HITS) give_up = 1;
          end
        end
        pdx = dx;
        pdy = dy;
      end
      if (!vis && pvis && px + SPEED + 7 > 638 && py + SPEED + 8 < 480) begin
        // at high speed the ball can overshoot the right edge entirely for
        // one frame before it bounces back
        hidden = 1;
        vis = 0;
      end else if (!vis && pvis) begin
        n_miss++;
        check(py + 8 >= 472, "ball lost at the bottom");
        check(led == 8'(rally_hits), "LEDs hold the count after a miss");
        if (SHRINK) bw = BAT_W0;
        rally++;
        if (rally >= RALLIES) done = 1;
      end
      ppvis = pvis && vis;
      pvis = vis;
      if (!hidden) begin
        px = x;
        py = y;
      end

      // ---- bat
      bx_exp = bat_of(int'(code));
      lo = (bx_exp <= bw) ? 0 : bx_exp - bw;
      hi = bx_exp + bw > 638 ? 638 : bx_exp + bw;
      check(bad_n == 0, "only white, red, cyan or black pixels");
      check(bat_r0 == 397 && bat_r1 == 403, "bat rows 397..403");
      // with a shrinking bat the return shrinks it one frame before the
      // reversal can be seen, so the next width is accepted as well
      if (SHRINK && (bat_c0 != lo || bat_c1 != hi) && bw > 1) begin
        lo = (bx_exp <= bw - 1) ? 0 : bx_exp - (bw - 1);
        hi = bx_exp + bw - 1 > 638 ? 638 : bx_exp + bw - 1;
      end
      check(bat_c0 == lo && bat_c1 == hi, $sformatf("bat columns %0d..%0d, got %0d..%0d", lo, hi, bat_c0, bat_c1));
      if (last_bat >= 0 && bat_c0 != last_bat) n_bat_move++;
      last_bat = bat_c0;

      // ---- next move
      if (!vis && !done && !hidden) begin
        // serve after a short pause
        if (!serving && frames > 4) serving = 1;
        btn = serving;
      end
      if (vis) begin
        if (give_up) code = 12'(code_for(x < 320 ? 600 : 30));
        else         code = 12'(code_for(x));
      end
      clear_stats();
    end
  end

endmodule
