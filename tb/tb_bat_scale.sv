// tb_bat_scale: exhaustive check of the ADC-to-column mapping against
// floor(v/8) + floor(v/32), plus its end points (0 -> 0, 4095 -> 638).
module tb_bat_scale;
  import pong_pkg::*;
  logic [11:0] adc_value;
  coord_t      bat_x;
  int          checks = 0, failures = 0;

  bat_scale dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      adc_value = 12'(v);
      #1;
      checks++;
      if (int'(bat_x) != v / 8 + v / 32) begin
        failures++;
        $display("FAIL v=%0d got %0d", v, bat_x);
      end
    end
    adc_value = 12'hFFF; #1;
    checks++; if (bat_x != 10'd638) failures++;
    adc_value = 12'h000; #1;
    checks++; if (bat_x != 10'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
