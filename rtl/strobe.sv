// strobe: re-times the divider core output to the edges of the input signal.
//
// Two latches in parallel take the core output: latch_a is transparent while
// the input clock is low and latch_b while it is high. A mux selected by the
// input clock always shows the closed latch, so the pair is a flip-flop that
// samples on both edges of the input clock. Jitter collected along the ripple
// chain of the core is removed because the output moves only on input edges.
//
// The structure (two parallel latches and a mux, clocked by the input signal)
// follows the published divider; the asynchronous active-low reset is this
// design's addition.
//
// Interface: in_clk is the input signal, d the divider core output, q the
// re-timed output. Timing: q shows the value d had just before the latest
// edge (rising or falling) of in_clk, one half input period of delay.
//
// The two latches are intended: the block is a latch pair by design.
module strobe (
  input  logic rst_n,
  input  logic in_clk,
  input  logic d,
  output logic q
);

  logic la_q, lb_q;

  always_latch begin
    if (!rst_n)       la_q = 1'b0;
    else if (!in_clk) la_q = d;
  end

  always_latch begin
    if (!rst_n)      lb_q = 1'b0;
    else if (in_clk) lb_q = d;
  end

  assign q = in_clk ? la_q : lb_q;

endmodule
