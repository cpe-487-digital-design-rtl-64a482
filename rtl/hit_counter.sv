// hit_counter: number of successful returns since the last serve.
//
// A WIDTH-bit binary counter (8 by default, one bit per board LED). It is
// cleared by the one-clock clear pulse (a serve starting a game) and
// advanced by the one-clock inc pulse (the bat returning the ball); clear
// wins if both come together. The count wraps after 2**WIDTH - 1. The
// output is the register itself, so it changes one clock after a pulse.
//
// The function (count hits after each serve, show them in binary on the
// LEDs) is from the exercises of the published design; the width, the
// wrap-around and the reset to zero are this implementation's choices.
module hit_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,    // synchronous, active high
  input  logic             clear,  // a serve started a game
  input  logic             inc,    // the bat returned the ball
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (inc)     count <= count + 1'b1;
  end

endmodule
