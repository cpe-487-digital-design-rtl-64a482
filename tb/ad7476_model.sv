// ad7476_model: behavioural model of the serial output of one AD7476
// 12-bit ADC, for simulation only (not synthesizable logic, and not a
// model of the analog conversion).
//
// A falling edge of cs_n starts a conversion of the code presented on
// 'code' (the digital value of the analog input, 0..4095). The converter
// then sends 16 bits, MSB first: four zeros followed by the 12-bit code.
// The first zero appears when cs_n falls; each falling edge of sclk moves
// on to the next bit. After the sixteenth falling edge, and while cs_n is
// high, the real part's output floats; this two-state model drives 0.
module ad7476_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] code,
  output logic        sdata
);
  logic [15:0] word = '0;
  int          idx  = 16;

  initial sdata = 1'b0;

  always @(negedge cs_n) begin
    word  <= {4'b0000, code};
    idx   <= 0;
    sdata <= 1'b0;
  end

  always @(negedge sclk) begin
    if (!cs_n && idx < 16) begin
      idx   <= idx + 1;
      sdata <= (idx + 1 < 16) ? word[15 - (idx + 1)] : 1'b0;
    end
  end

  always @(posedge cs_n) sdata <= 1'b0;
endmodule
