// bat_scale: maps the 12-bit ADC reading to the bat's column.
//
// The bat column is the reading times 5/32, computed without a multiplier
// as reading/8 + reading/32 (two shifts and one 10-bit add, truncating
// each term). A full-scale reading of 4095 gives 511 + 127 = 638, so the
// bat centre can reach from column 0 to the right edge of the 640-pixel
// screen. Purely combinational.
//
// The formula follows the published design.
module bat_scale
  import pong_pkg::*;
(
  input  logic [11:0] adc_value,  // 0 = 0 V, 4095 = full scale
  output coord_t      bat_x       // bat centre column, 0..638
);

  assign bat_x = {1'b0, adc_value[11:3]} + coord_t'(adc_value[11:5]);

endmodule
