// clock_divider: divide-by-two clock divider.
//
// One flip-flop whose inverted output feeds its own D input, so the output
// toggles on every rising edge of the input clock and runs at half its
// frequency with a 50 % duty cycle (24 MHz in, 12 MHz out in this design).
// Its rising edges follow rising edges of the input clock. An asynchronous,
// active-low reset starts the output low so that simulations begin from a
// known phase.
//
// Follows the document's clock divider circuit (inverter feeding a D
// flip-flop). The reset is this design's addition.
module clock_divider (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end

endmodule
