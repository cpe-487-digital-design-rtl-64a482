// tb_vga_sync: checks the VGA raster generator for a little over one frame.
// The expected counters come from the number k of pixel-enable edges since
// reset: column k mod 800, line floor((k + 100) / 800) mod 525 (the line
// advances when the column leaves 699). Every registered output is compared
// with the value those give, and the sync pulse widths and periods are
// measured: hsync 97 pixels low every 800, vsync 2 lines low every 525.
module tb_vga_sync;
  import pong_pkg::*;
  logic   clk = 1'b0, rst = 1'b1, pix_en = 1'b0;
  rgb_t   rgb_in, rgb_out;
  logic   hsync, vsync;
  coord_t pixel_row, pixel_col;
  int     checks = 0, failures = 0;

  vga_sync dut (.*);

  always #5 clk = ~clk;

  // test colour: a pattern of the pixel address
  always_comb begin
    rgb_in.r = pixel_col[0];
    rgb_in.g = pixel_row[0];
    rgb_in.b = pixel_col[3] ^ pixel_row[2];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int hpos(input int k);
    return k % 800;
  endfunction
  function automatic int vpos(input int k);
    return ((k + 100) / 800) % 525;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   k, h1, v1, h2, v2, hlow_run, hfall_last, vfall_last;
    rgb_t prev_in, exp_rgb;
    logic prev_hs, prev_vs;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    k = 0;
    hlow_run = 0; hfall_last = -1; vfall_last = -1;
    prev_hs = 1'b1; prev_vs = 1'b1;
    prev_in = rgb_in;
    // pixel enable every second clock, as in the full design
    while (k < 430_000) begin
      pix_en <= 1'b1;
      @(posedge clk);
      pix_en <= 1'b0;
      k++;
      #1;
      h1 = hpos(k - 1); v1 = vpos(k - 1);   // state the outputs were registered from
      check(int'(pixel_col) == h1, "pixel_col");
      check(int'(pixel_row) == v1, "pixel_row");
      check(hsync == !(h1 >= 659 && h1 <= 755), "hsync");
      check(vsync == !(v1 >= 493 && v1 <= 494), "vsync");
      exp_rgb = (h1 < 640 && v1 < 480) ? prev_in : '0;
      check(rgb_out == exp_rgb, "blanked colour");
      // pulse widths and periods
      if (!hsync) hlow_run++;
      if (prev_hs && !hsync) begin
        if (hfall_last >= 0) check(k - hfall_last == 800, "hsync period");
        hfall_last = k;
      end
      if (!prev_hs && hsync) begin
        check(hlow_run == 97, "hsync width");
        hlow_run = 0;
      end
      if (prev_vs && !vsync) begin
        if (vfall_last >= 0) check(k - vfall_last == 420_000, "vsync period");
        vfall_last = k;
      end
      prev_hs = hsync; prev_vs = vsync;
      prev_in = rgb_in;
      @(posedge clk);
    end
    check(vfall_last > 0, "vsync seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
