// tb_pong_timing: self-checking test of the clock-enable and ADC-timing
// generator. A reference count of clock edges since reset predicts every
// output; the test also measures the SCLK period, the CS low time in SCLK
// periods, that CS only changes with a rising SCLK edge, and that each
// strobe precedes exactly the edge it announces.
module tb_pong_timing;
  logic clk = 1'b0, rst = 1'b1;
  logic pix_en, adc_sclk, adc_cs, sclk_fall, cs_rise;
  int   checks = 0, failures = 0;

  pong_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    int falls_in_low, last_fall, period;
    logic p_sclk, p_cs, p_sf, p_cr;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);  // first edge with reset low: counter now 1
    n = 1;
    falls_in_low = 0;
    last_fall = -1;
    p_sclk = adc_sclk; p_cs = adc_cs; p_sf = sclk_fall; p_cr = cs_rise;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      #1;
      // reference: n edges since reset
      check(adc_sclk == !((n >> 4) & 1), "sclk value");
      check(adc_cs == ((n >> 9) & 1), "cs value");
      check(pix_en == ((n & 1) == 0), "pixel enable");
      if (cyc > 0) begin
        // strobes announce the edge that just happened
        check(p_sf == (p_sclk && !adc_sclk), "sclk_fall strobe");
        check(p_cr == (!p_cs && adc_cs), "cs_rise strobe");
        if (p_cs != adc_cs) check(!p_sclk && adc_sclk, "CS changes with rising SCLK");
        if (p_sclk && !adc_sclk) begin
          if (last_fall >= 0) begin
            period = n - last_fall;
            check(period == 32, "SCLK period 32 clocks");
          end
          last_fall = n;
          if (!adc_cs) falls_in_low++;
        end
        if (p_cs && !adc_cs) falls_in_low = 0;
        if (!p_cs && adc_cs) check(falls_in_low == 16, "16 SCLK falls while CS low");
      end
      p_sclk = adc_sclk; p_cs = adc_cs; p_sf = sclk_fall; p_cr = cs_rise;
      @(posedge clk);
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
