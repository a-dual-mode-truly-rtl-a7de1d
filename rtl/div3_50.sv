// div3_50: divide-by-three with a 50% duty cycle.
//
// A 1/1.5 cell with its modulus bit and feedback control both tied high
// divides the input by 1.5 on every period (high for half an input period,
// low for a whole one). A divide-by-two stage behind it turns that into a
// division by 3 with the output high for exactly 1.5 input periods and low
// for 1.5: a 50% duty cycle from an odd ratio.
//
// A 50% duty-cycle divide-by-three built on the 1/1.5 cell is a published
// circuit, but its insides are not given; composing it from the cell in its
// divide-by-1.5 mode and the divide-by-two stage is this design's reading.
// The reset is this design's addition.
//
// Interface: in_clk is the input, out the divided output. Timing: out changes
// on every third edge of in_clk, alternately on rising and falling edges.
//
// The combinational loop that lint tools report through div15_out is the
// latch loop of the 1/1.5 cell; it is intended (see div15_cell).
module div3_50 (
  input  logic rst_n,
  input  logic in_clk,
  output logic out
);

  logic div15_out;

  div15_cell u_cell (
    .rst_n   (rst_n),
    .in_clk  (in_clk),
    .mod     (1'b1),
    .fb_ctrl (1'b1),
    .out     (div15_out)
  );

  div2 u_div2 (
    .rst_n   (rst_n),
    .clk_in  (div15_out),
    .clk_out (out)
  );

endmodule
