// div15_cell: the 1/1.5 divider cell.
//
// The cell divides its input IN by 1, or stretches one output period by half
// an input period. It does this by acting on both edges of IN: latch1 is
// transparent while IN is low and latch2 while IN is high, and mux1 (select =
// IN) always shows the latch that is currently closed. The pair therefore
// behaves as a flip-flop that samples on both edges, and its data input is
//   D = ~OUT & ~(MOD & fb)
// so OUT normally toggles on every edge of IN (OUT follows IN, divide by 1).
// The lower pair, latch3/latch4 with mux2, is a second both-edge sampler of
// (OUT & FB_CTRL). When FB_CTRL is high during a high half period of OUT and
// MOD is high, the lower pair delivers a 1 one half period later and the AND
// gate holds OUT low for one extra half period: that output period lasts
// 1.5 input periods. With MOD and FB_CTRL held high every period is 1.5 input
// periods, high for one half period and low for two.
//
// Structure (four latches, two muxes, three AND gates and the inverters) is
// taken from the published schematic of the cell. The asynchronous active-low
// reset of the latches is this design's addition, so that a simulation starts
// from a known state; the cell has none in the original.
//
// Interface: in_clk is IN, mod is the cell's modulus bit (MOD_0 in the
// divider), fb_ctrl comes from the next cell of the chain, out is OUT.
// Timing: out changes only at edges of in_clk, one half period after the
// data it shows was presented to the latches.
//
// The loop OUT -> AND -> latch -> mux1 -> OUT is closed through a latch that
// is always opaque while it is selected, so it holds no combinational cycle
// in operation; a tool that traces nets without latch enables still reports
// it as a loop. The four latches are intended.
module div15_cell (
  input  logic rst_n,
  input  logic in_clk,
  input  logic mod,
  input  logic fb_ctrl,
  output logic out
);

  logic l1_q, l2_q;   // upper latch pair (output path)
  logic l3_q, l4_q;   // lower latch pair (feedback path)
  logic d_out;        // D input of latch1/latch2
  logic d_fb;         // D input of latch3/latch4
  logic mux2_q;       // selected feedback latch
  logic fb_n;         // feedback into the upper AND gate, low = swallow

  // Bottom AND gate and inverter: swallow request when MOD is set.
  assign fb_n  = ~(mod & mux2_q);
  // Top AND gate: inverted OUT gated by the feedback.
  assign d_out = ~out & fb_n;
  // Right AND gate: OUT gated by FB_CTRL of the next cell.
  assign d_fb  = out & fb_ctrl;

  // latch1: transparent while IN is low, closes on the rising edge.
  always_latch begin
    if (!rst_n)       l1_q = 1'b0;
    else if (!in_clk) l1_q = d_out;
  end

  // latch2: transparent while IN is high, closes on the falling edge.
  always_latch begin
    if (!rst_n)      l2_q = 1'b0;
    else if (in_clk) l2_q = d_out;
  end

  // latch3: transparent while IN is low.
  always_latch begin
    if (!rst_n)       l3_q = 1'b0;
    else if (!in_clk) l3_q = d_fb;
  end

  // latch4: transparent while IN is high.
  always_latch begin
    if (!rst_n)      l4_q = 1'b0;
    else if (in_clk) l4_q = d_fb;
  end

  // mux1 and mux2: input 1 while IN is high, input 0 while IN is low.
  assign out    = in_clk ? l1_q : l2_q;
  assign mux2_q = in_clk ? l3_q : l4_q;

endmodule
