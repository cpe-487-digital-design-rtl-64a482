// adc_if: serial-to-parallel receiver for a two-channel serial ADC
// (PmodAD1, two AD7476 converters sharing CS and SCLK).
//
// While CS is low the converters send 16 bits each, MSB first, changing
// their data on SCLK's falling edges: four leading zeros, then the 12-bit
// result. Each channel shifts its data line into the least significant end
// of a DATA_W = 12-bit register on every SCLK falling edge that comes while
// CS is low. After 16 edges the four zeros have left the register at the
// top and the register holds the result; when CS rises both registers are
// copied to the parallel outputs, which then hold until the next conversion.
//
// Timing: the receiver runs on the system clock. The strobe sclk_fall marks
// the clock cycle whose closing edge is a falling edge of SCLK; the data
// line is sampled on that edge, so it sees the bit that was valid before
// the fall, as a flop clocked by the falling SCLK would. cs_rise marks the
// cycle whose closing edge raises CS; the outputs are loaded on that edge.
//
// The shift direction, the register width and the load on CS rising follow
// the published design; the clock-enable form (instead of SCLK and CS used
// as clocks) and the synchronous reset to zero are this implementation's
// choices.
module adc_if #(
  parameter int unsigned DATA_W = 12
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              sclk_fall,  // SCLK falls at the end of this cycle
  input  logic              cs,         // chip select as sent to the ADC (active low)
  input  logic              cs_rise,    // CS rises at the end of this cycle
  input  logic              sdata1,     // serial data, channel 1
  input  logic              sdata2,     // serial data, channel 2
  output logic [DATA_W-1:0] data_1,     // last result, channel 1
  output logic [DATA_W-1:0] data_2      // last result, channel 2
);

  logic [DATA_W-1:0] pdata1, pdata2;

  // A word is complete before it is loaded: the last shift and the load
  // never fall on the same edge.
  a_no_shift_at_load: assert property (
    @(posedge clk) disable iff (rst) cs_rise |-> !(sclk_fall && !cs));

  always_ff @(posedge clk) begin
    if (rst) begin
      pdata1 <= '0;
      pdata2 <= '0;
      data_1 <= '0;
      data_2 <= '0;
    end else begin
      if (sclk_fall && !cs) begin
        pdata1 <= {pdata1[DATA_W-2:0], sdata1};
        pdata2 <= {pdata2[DATA_W-2:0], sdata2};
      end
      if (cs_rise) begin
        data_1 <= pdata1;
        data_2 <= pdata2;
      end
    end
  end

endmodule
