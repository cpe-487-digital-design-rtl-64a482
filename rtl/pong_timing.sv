// pong_timing: clock enables and ADC control lines for the PONG game.
//
// A single free-running counter, clocked by the 50 MHz board clock, times
// everything. A toggle flop halves the clock to give the 25 MHz pixel rate,
// delivered as the enable pix_en (high on every second clock) rather than a
// second clock. Bit SCLK_BIT of the counter, inverted, is the ADC serial
// clock: with the default SCLK_BIT = 4 it has a period of 32 clocks,
// 50 MHz / 32 = 1.5625 MHz. The top counter bit is the ADC chip select: it
// is low for half of the 2**CNT_W = 1024-clock cycle, that is for 16 SCLK
// periods, and because every bit below it wraps to zero at the same edge, CS
// always changes together with a rising edge of SCLK.
//
// The two strobes tell the ADC receiver, one clock ahead, where the serial
// clock edges fall: sclk_fall is high in the clock cycle whose closing edge
// makes SCLK fall, cs_rise in the one whose closing edge raises CS. Sampling
// the serial data on that edge is the same as sampling it on SCLK's falling
// edge, without a second clock domain.
//
// An assertion checks that CS only ever changes with a rising SCLK edge.
//
// Counter widths and bit choices follow the published design; the clock
// enables and the synchronous active-high reset (clearing the counter and
// the toggle flop) are this implementation's choices.
module pong_timing #(
  parameter int unsigned CNT_W    = 10,  // counter width; CS is its top bit
  parameter int unsigned SCLK_BIT = 4    // counter bit that, inverted, is SCLK
) (
  input  logic clk,        // 50 MHz system clock
  input  logic rst,        // synchronous, active high
  output logic pix_en,     // 25 MHz pixel-rate enable
  output logic adc_sclk,   // ADC serial clock
  output logic adc_cs,     // ADC chip select, active low
  output logic sclk_fall,  // SCLK falls at the end of this cycle
  output logic cs_rise     // CS rises at the end of this cycle
);

  logic             ck_25;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      ck_25 <= 1'b0;
      count <= '0;
    end else begin
      ck_25 <= ~ck_25;
      count <= count + 1'b1;
    end
  end

  // The pixel clock would rise at the closing edge of every cycle in which
  // it is low.
  assign pix_en   = ~ck_25;

  assign adc_sclk = ~count[SCLK_BIT];
  assign adc_cs   = count[CNT_W-1];

  // SCLK falls when bit SCLK_BIT goes 0 -> 1, i.e. when the bits up to it
  // read 0111..1; CS rises when the counter leaves 0111..1.
  assign sclk_fall = (count[SCLK_BIT:0] == {1'b0, {SCLK_BIT{1'b1}}});
  assign cs_rise   = (count == {1'b0, {(CNT_W-1){1'b1}}});

  // The converter requires CS to change only together with a rising SCLK.
  a_cs_on_sclk_rise: assert property (
    @(posedge clk) disable iff (rst)
      (adc_cs != $past(adc_cs)) |-> (adc_sclk && !$past(adc_sclk)));

endmodule
