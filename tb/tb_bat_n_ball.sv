// tb_bat_n_ball: checks the playfield logic against a reference model of
// the game rules, frame by frame, for two instances: the default
// configuration (speed 6, bat half-width 20) and one with the switch speed
// and the shrinking bat enabled. A simple player moves the bat under the
// ball, sometimes off target or away so that misses happen, and serves
// when no game is on. After every frame the ball position, game state, bat
// width and the hit / serve pulses are compared with the model, and
// pixels around the ball and the bat, plus random ones, are compared with
// the drawing rules. The test fails if a serve, a hit, a miss or a bounce
// off any of the three walls never happens in either instance.
module tb_bat_n_ball;
  import pong_pkg::*;

  localparam int NFRAMES = 4000;

  logic       clk = 1'b0, rst = 1'b1, v_sync = 1'b0;
  coord_t     pixel_row, pixel_col;
  coord_t     bat_x [2];
  logic       serve [2];
  logic [5:0] speed_sw;
  rgb_t       rgb [2];
  logic       game_on [2], hit [2], serve_start [2];
  coord_t     ball_x [2], ball_y [2], bat_w [2];
  int         checks = 0, failures = 0;

  bat_n_ball dut0 (
    .clk, .rst, .v_sync, .pixel_row, .pixel_col, .bat_x(bat_x[0]), .serve(serve[0]),
    .speed_sw, .rgb(rgb[0]), .game_on(game_on[0]), .ball_x(ball_x[0]),
    .ball_y(ball_y[0]), .bat_w(bat_w[0]), .hit(hit[0]), .serve_start(serve_start[0])
  );
  bat_n_ball #(.SPEED_FROM_SW(1'b1), .SHRINK_BAT(1'b1)) dut1 (
    .clk, .rst, .v_sync, .pixel_row, .pixel_col, .bat_x(bat_x[1]), .serve(serve[1]),
    .speed_sw, .rgb(rgb[1]), .game_on(game_on[1]), .ball_x(ball_x[1]),
    .ball_y(ball_y[1]), .bat_w(bat_w[1]), .hit(hit[1]), .serve_start(serve_start[1])
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------- reference
  typedef struct {
    bit g;
    int bx, by, xm, ym, bw;
    bit hit, serve_start;
  } game_t;

  game_t m [2];
  int    n_serve [2], n_hit [2], n_miss [2], n_top [2], n_left [2], n_right [2];

  function automatic int w10(input int a);
    return a & 1023;
  endfunction

  function automatic game_t step(input game_t s, input bit srv, input int batx,
                                 input int speed, input bit shrink);
    game_t n = s;
    int left, right, ny, nx;
    bit contact;
    if (srv && !s.g) begin n.g = 1; n.ym = -speed; end
    else if (s.by <= 8) n.ym = speed;
    else if (w10(s.by + 8) >= 480) begin n.ym = -speed; n.g = 0; end
    if (w10(s.bx + 8) >= 640) n.xm = -speed;
    else if (s.bx <= 8) n.xm = speed;
    left  = w10(batx - s.bw);
    right = w10(batx + s.bw);
    contact = w10(s.bx + 4) >= left && w10(s.bx - 4) <= right &&
              w10(s.by + 4) >= 397 && w10(s.by - 4) <= 403;
    if (contact) n.ym = -speed;
    n.hit = contact && s.g && s.ym >= 0;
    n.serve_start = srv && !s.g;
    ny = s.by + s.ym;
    nx = s.bx + s.xm;
    n.by = !s.g ? 440 : (ny < 0 ? 0 : ny);
    n.bx = nx < 0 ? 0 : nx;
    if (shrink) begin
      if (s.g && !n.g) n.bw = 40;
      else if (n.hit && s.bw > 1) n.bw = s.bw - 1;
    end
    return n;
  endfunction

  function automatic rgb_t draw(input game_t s, input int batx, input int c, input int r);
    int vx = s.bx > c ? s.bx - c : c - s.bx;
    int vy = s.by > r ? s.by - r : r - s.by;
    bit ball_on = s.g && (vx * vx + vy * vy < 64);
    bit bat_on = (c >= w10(batx - s.bw) || batx <= s.bw) && c <= w10(batx + s.bw) &&
                 r >= 397 && r <= 403;
    rgb_t o;
    o.r = !bat_on;
    o.g = !ball_on;
    o.b = !ball_on;
    return o;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_pixel(input int c, input int r);
    if (c < 0 || c > 1023 || r < 0 || r > 1023) return;
    pixel_col = coord_t'(c);
    pixel_row = coord_t'(r);
    #1;
    for (int i = 0; i < 2; i++)
      check(rgb[i] == draw(m[i], int'(bat_x[i]), c, r), $sformatf("pixel %0d,%0d dut%0d", c, r, i));
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sp, aim [2];
    bit away [2], decided [2];
    game_t p;
    speed_sw  = 6'd6;
    pixel_row = '0;
    pixel_col = '0;
    for (int i = 0; i < 2; i++) begin
      bat_x[i] = 10'd320; serve[i] = 1'b0; away[i] = 0; decided[i] = 0; aim[i] = 0;
      n_serve[i] = 0; n_hit[i] = 0; n_miss[i] = 0; n_top[i] = 0; n_left[i] = 0; n_right[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    m[0] = '{g: 0, bx: 320, by: 240, xm: 6, ym: 6, bw: 20, hit: 0, serve_start: 0};
    m[1] = '{g: 0, bx: 320, by: 240, xm: 6, ym: 6, bw: 40, hit: 0, serve_start: 0};
    for (int f = 0; f < NFRAMES; f++) begin
      // player: follow the ball with a small random error; now and then
      // give up on a rally so that the ball is missed
      for (int i = 0; i < 2; i++) begin
        if (m[i].g && m[i].ym > 0 && !decided[i]) begin
          away[i]    = ($urandom_range(0, 99) < 25);
          aim[i]     = $signed($urandom_range(0, 30)) - 15;
          decided[i] = 1;
        end
        if (m[i].ym < 0) decided[i] = 0;
        if (!m[i].g) away[i] = 0;
        if (away[i]) bat_x[i] = coord_t'(m[i].bx < 320 ? 600 : 30);
        else begin
          sp = m[i].bx + aim[i];
          bat_x[i] = coord_t'(sp < 0 ? 0 : (sp > 638 ? 638 : sp));
        end
        serve[i] = !m[i].g && ($urandom_range(0, 9) == 0);
      end
      // switch speed changes now and then (1..40, above 32 is held at 32)
      if ($urandom_range(0, 199) == 0) speed_sw = 6'($urandom_range(1, 40));
      // one frame: v_sync rises
      @(negedge clk);
      v_sync = 1'b1;
      @(posedge clk);   // edge seen, state updated
      #1;
      for (int i = 0; i < 2; i++) begin
        sp = (i == 0) ? 6 : (int'(speed_sw) > 32 ? 32 : int'(speed_sw));
        p = m[i];
        m[i] = step(m[i], serve[i], int'(bat_x[i]), sp, i == 1);
        if (m[i].serve_start) n_serve[i]++;
        if (m[i].hit) n_hit[i]++;
        if (p.g && !m[i].g) n_miss[i]++;
        if (p.g && p.by <= 8) n_top[i]++;
        if (p.bx <= 8 && p.xm < 0) n_left[i]++;
        if (p.bx + 8 >= 640 && p.xm > 0) n_right[i]++;
        check(game_on[i] == m[i].g, $sformatf("game_on dut%0d", i));
        check(int'(ball_x[i]) == m[i].bx, $sformatf("ball_x dut%0d", i));
        check(int'(ball_y[i]) == m[i].by, $sformatf("ball_y dut%0d", i));
        check(int'(bat_w[i]) == m[i].bw, $sformatf("bat_w dut%0d", i));
        check(hit[i] == m[i].hit, $sformatf("hit dut%0d", i));
        check(serve_start[i] == m[i].serve_start, $sformatf("serve_start dut%0d", i));
      end
      @(posedge clk);
      #1;
      check(hit[0] == 1'b0 && hit[1] == 1'b0, "hit is a one-clock pulse");
      repeat (3) @(posedge clk);
      v_sync = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      check(int'(ball_x[0]) == m[0].bx, "no move without a v_sync edge");
      // drawing: a window round each ball, the bat edges, random pixels
      for (int i = 0; i < 2; i++) begin
        for (int dy = -9; dy <= 9; dy += 3)
          for (int dx = -9; dx <= 9; dx++)
            check_pixel(m[i].bx + dx, m[i].by + dy);
        for (int dy = 395; dy <= 405; dy++) begin
          check_pixel(int'(bat_x[i]) - m[i].bw - 1, dy);
          check_pixel(int'(bat_x[i]) - m[i].bw, dy);
          check_pixel(int'(bat_x[i]) + m[i].bw, dy);
          check_pixel(int'(bat_x[i]) + m[i].bw + 1, dy);
        end
      end
      for (int j = 0; j < 20; j++) check_pixel($urandom_range(0, 799), $urandom_range(0, 524));
      // bat near the left edge
      if (f % 50 == 0) begin
        bat_x[0] = coord_t'($urandom_range(0, 25));
        bat_x[1] = bat_x[0];
        for (int c = 0; c < 70; c++) check_pixel(c, 400);
      end
    end
    for (int i = 0; i < 2; i++) begin
      $display("dut%0d: serves %0d hits %0d misses %0d top %0d left %0d right %0d",
               i, n_serve[i], n_hit[i], n_miss[i], n_top[i], n_left[i], n_right[i]);
      check(n_serve[i] > 0, "a serve happened");
      check(n_hit[i] > 0, "a hit happened");
      check(n_miss[i] > 0, "a miss happened");
      check(n_top[i] > 0, "a top-wall bounce happened");
      check(n_left[i] > 0, "a left-wall bounce happened");
      check(n_right[i] > 0, "a right-wall bounce happened");
    end
    check(m[1].bw < 40, "bat shrank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
