// div2: divide-by-two stage giving a 50% duty cycle.
//
// A toggle flip-flop on the rising edge of its input. Whatever the duty cycle
// of the input, the output is high for exactly one input period and low for
// the next, so its duty cycle is 50% and its period twice the input period.
// This is how the divider turns any integer ratio, odd ones included, into a
// 50% duty-cycle output: the fractional output of ratio X (a multiple of 0.5)
// divided by two has the integer ratio 2X.
//
// The function follows the published divider; the toggle flip-flop and its
// asynchronous active-low reset (output low) are this design's choice.
//
// Interface: clk_in is the signal to divide, clk_out the result. Timing:
// clk_out changes on every rising edge of clk_in.
module div2 (
  input  logic rst_n,
  input  logic clk_in,
  output logic clk_out
);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end

endmodule
