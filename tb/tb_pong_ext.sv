// tb_pong_ext: end-to-end test of the PONG design with both exercise
// options on: ball speed from the switches (set to 12 pixels per frame)
// and the double-width bat that loses one pixel of half-width per return.
// Two converter models stand in for the PmodAD1; the player helper decodes
// the VGA output, steers the bat and serves. It plays one rally of two
// returns and a miss, checking the bat width after every return (81, 79...
// pixels) and its restoration after each miss, the LED return count, the
// 12-pixel steps of the ball, and the sync and ADC timing as in tb_pong.
// It fails if a serve, a return, a miss, a bounce off each wall or a bat
// movement by the ADC never happened.
module tb_pong_ext;
  logic        clk = 1'b0, rst = 1'b1;
  logic        btn0;
  logic [5:0]  sw = 6'd12;
  logic        adc_cs, adc_sclk, sdata1, sdata2;
  logic [2:0]  vga_r, vga_g;
  logic [1:0]  vga_b;
  logic        hsync, vsync;
  logic [7:0]  led;
  logic [11:0] code;
  logic        done;
  int          p_checks, p_failures;
  int          n_serve, n_hit, n_miss, n_top, n_left, n_right, n_bat_move;
  int          checks = 0, failures = 0;

  pong #(.SPEED_FROM_SW(1'b1), .SHRINK_BAT(1'b1)) dut (
    .clk_50MHz (clk), .rst, .btn0, .sw,
    .ADC_CS (adc_cs), .ADC_SCLK (adc_sclk), .ADC_SDATA1 (sdata1), .ADC_SDATA2 (sdata2),
    .VGA_red (vga_r), .VGA_green (vga_g), .VGA_blue (vga_b),
    .VGA_hsync (hsync), .VGA_vsync (vsync), .led
  );

  ad7476_model u_adc1 (.cs_n(adc_cs), .sclk(adc_sclk), .code(12'h5A5), .sdata(sdata1));
  ad7476_model u_adc2 (.cs_n(adc_cs), .sclk(adc_sclk), .code(code), .sdata(sdata2));

  pong_player #(.SPEED(12), .BAT_W0(40), .SHRINK(1), .HITS(2), .RALLIES(1)) u_player (
    .clk, .red(vga_r), .green(vga_g), .blue(vga_b), .hsync, .vsync, .led,
    .code, .btn(btn0), .done, .checks(p_checks), .failures(p_failures),
    .n_serve, .n_hit, .n_miss, .n_top, .n_left, .n_right, .n_bat_move
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // timing of the sync and ADC lines, in clocks
  longint cyc = 0, hs_last = -1, vs_last = -1, sclk_last = -1, cs_fall = -1;
  logic   hs_q = 1, vs_q = 1, sclk_q = 1, cs_q = 1;
  int     n_hs = 0, n_vs = 0, n_conv = 0, sclk_falls = 0;

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (hs_q && !hsync) begin
        if (hs_last >= 0) begin n_hs++; if (cyc - hs_last != 1600) check(0, "hsync period 1600 clocks"); end
        hs_last = cyc;
      end
      if (vs_q && !vsync) begin
        if (vs_last >= 0) begin n_vs++; check(cyc - vs_last == 840_000, "vsync period 840000 clocks"); end
        vs_last = cyc;
      end
      if (sclk_q && !adc_sclk) begin
        if (sclk_last >= 0 && cyc - sclk_last != 32) check(0, "SCLK period 32 clocks");
        sclk_last = cyc;
        if (!adc_cs) sclk_falls++;
      end
      if (cs_q && !adc_cs) begin
        if (cs_fall >= 0) begin n_conv++; if (cyc - cs_fall != 1024) check(0, "conversion every 1024 clocks"); end
        cs_fall = cyc;
        sclk_falls = 0;
      end
      if (!cs_q && adc_cs && cs_fall >= 0) check(sclk_falls == 16, "16 SCLK falls per conversion");
      hs_q = hsync; vs_q = vsync; sclk_q = adc_sclk; cs_q = adc_cs;
    end
  end

  // a dead raster ends the run early
  initial begin
    repeat (2_000_000) @(posedge clk);
    if (n_vs == 0) begin
      failures++;
      $display("no frames seen");
      $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks, failures + p_failures);
      $finish;
    end
  end

  initial begin
    #6_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks, failures + p_failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    $display("frames %0d, conversions %0d: serves %0d returns %0d misses %0d top %0d left %0d right %0d bat moves %0d",
             n_vs, n_conv, n_serve, n_hit, n_miss, n_top, n_left, n_right, n_bat_move);
    check(n_hs > 1000, "hsync seen");
    check(n_serve > 0, "a serve happened");
    check(n_hit > 0, "a return off the bat happened");
    check(n_miss > 0, "a miss happened");
    check(n_top > 0, "a top-wall bounce happened");
    check(n_left > 0, "a left-wall bounce happened");
    check(n_right > 0, "a right-wall bounce happened");
    check(n_bat_move > 0, "the bat followed the ADC");
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks, failures + p_failures);
    $finish;
  end
endmodule
