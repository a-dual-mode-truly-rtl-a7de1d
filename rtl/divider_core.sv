// divider_core: the programmable fractional divider core.
//
// A 1/1.5 cell is followed by a chain of N 2/3 cells. Each cell is clocked by
// the output of the cell before it; each cell hands a feedback control
// (FB_CTRL) back to the cell before it, and the last cell's feedback input is
// tied high. Once per output period the feedback travels from the last cell
// back to the first, and every cell whose modulus bit is set adds one of its
// input periods to the output period; the 1/1.5 cell adds half an input
// period. The output period is
//   T_OUT = (2^N + 2^(N-1) MOD_N + ... + 2 MOD_2 + MOD_1 + 0.5 MOD_0) T_IN
// so with the modulus word m = {MOD_N..MOD_0} the ratio is 2^N + m/2: from
// 2^N to 2^(N+1) - 0.5 in steps of 0.5 (128 .. 255.5 for the default N = 7).
//
// The chain structure, the equation and N = 7 follow the published divider;
// the insides of the 2/3 cell are this design's own (see div23_cell).
//
// Interface: in_clk is the input signal, mod[k] is MOD_k, out is F_OUT, the
// output of the last cell. Timing: the modulus word is used late in each
// output period (the feedback starts in the second half of the last cell's
// period), so a word changed shortly after a rising edge of out sets the
// length of the period that this edge begins. out changes on rising edges of
// in_clk, possibly after a ripple through the chain.
//
// Lint tools report a combinational loop through f_out[1]: it is the loop of
// the 1/1.5 cell, closed through a latch that is opaque whenever it is
// selected (see div15_cell), and it stands by design.
module divider_core
  import fdiv_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         rst_n,
  input  logic         in_clk,
  input  logic [N:0]   mod,
  output logic         out
);

  logic [N+1:1] f_out;     // f_out[i]   : output of cell i
  logic [N+1:1] fb_ctrl;   // fb_ctrl[i] : FB_CTRL_i, from cell i+1 to cell i

  assign fb_ctrl[N+1] = 1'b1;

  div15_cell u_cell1 (
    .rst_n   (rst_n),
    .in_clk  (in_clk),
    .mod     (mod[0]),
    .fb_ctrl (fb_ctrl[1]),
    .out     (f_out[1])
  );

  for (genvar i = 2; i <= N + 1; i++) begin : g_cell
    div23_cell u_cell (
      .rst_n   (rst_n),
      .fin     (f_out[i-1]),
      .p       (mod[i-1]),
      .mod_in  (fb_ctrl[i]),
      .fout    (f_out[i]),
      .mod_out (fb_ctrl[i-1])
    );
  end

  assign out = f_out[N+1];

endmodule
