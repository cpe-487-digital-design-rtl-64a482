// tb_adc_if: the ADC receiver, driven by the timing generator and two
// models of the serial converter. Each conversion presents new random codes
// on both channels; after CS rises the parallel outputs must hold exactly
// those codes, and they must change only at the CS rising edge. Checks the
// conversion rate too: one result per 1024 system clocks.
module tb_adc_if;
  logic        clk = 1'b0, rst = 1'b1;
  logic        pix_en, adc_sclk, adc_cs, sclk_fall, cs_rise;
  logic        sdata1, sdata2;
  logic [11:0] code1, code2, data_1, data_2;
  logic [11:0] exp1, exp2;
  int          checks = 0, failures = 0, loads = 0, last_load = -1, cyc = 0;

  pong_timing u_t (.clk, .rst, .pix_en, .adc_sclk, .adc_cs, .sclk_fall, .cs_rise);
  ad7476_model u_m1 (.cs_n(adc_cs), .sclk(adc_sclk), .code(code1), .sdata(sdata1));
  ad7476_model u_m2 (.cs_n(adc_cs), .sclk(adc_sclk), .code(code2), .sdata(sdata2));
  adc_if dut (.clk, .rst, .sclk_fall, .cs(adc_cs), .cs_rise, .sdata1, .sdata2,
              .data_1, .data_2);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new codes while CS is high, latched by the models when CS falls
  always @(posedge adc_cs) begin
    exp1  = code1;
    exp2  = code2;
    code1 = 12'($urandom);
    code2 = 12'($urandom);
  end

  initial begin
    logic [11:0] p1, p2;
    code1 = 12'hABC;
    code2 = 12'h123;
    exp1  = '0;
    exp2  = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    p1 = 0; p2 = 0;
    while (loads < 60) begin
      @(posedge clk);
      cyc++;
      #1;
      if (data_1 != p1 || data_2 != p2) begin
        checks++;
        if (!(adc_cs && u_t.count == 10'd512)) begin
          failures++;
          $display("FAIL outputs changed away from CS rising edge");
        end
      end
      if (adc_cs && u_t.count == 10'd512) begin
        loads++;
        // the first conversion after reset may have started mid-word
        if (loads > 1) begin
        checks += 2;
        if (data_1 != exp1) begin failures++; $display("FAIL ch1 %h exp %h", data_1, exp1); end
        if (data_2 != exp2) begin failures++; $display("FAIL ch2 %h exp %h", data_2, exp2); end
        end
        if (last_load >= 0) begin
          checks++;
          if (cyc - last_load != 1024) begin failures++; $display("FAIL rate %0d", cyc - last_load); end
        end
        last_load = cyc;
      end
      p1 = data_1; p2 = data_2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
