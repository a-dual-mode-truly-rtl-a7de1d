// fdiv_top: the dual-mode programmable fractional divider and the 50%
// duty-cycle divide-by-three circuit, side by side.
//
// The two circuits are independent test circuits with their own inputs and
// resets: the programmable divider (fractional output, ratio 2^N + m/2, and
// 50% duty-cycle integer output, ratio 2^(N+1) + m) and the divide-by-three
// circuit. See dual_mode_divider and div3_50 for how each works.
//
// Interface: in_clk, rst_n, mod, frac_out, int_out belong to the programmable
// divider; div3_in_clk, div3_rst_n, div3_out to the divide-by-three circuit.
// mod[k] is the modulus bit MOD_k, N+1 bits (8 for the default N = 7).
module fdiv_top
  import fdiv_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         rst_n,
  input  logic         in_clk,
  input  logic [N:0]   mod,
  output logic         frac_out,
  output logic         int_out,
  input  logic         div3_rst_n,
  input  logic         div3_in_clk,
  output logic         div3_out
);

  dual_mode_divider #(.N(N)) u_divider (
    .rst_n    (rst_n),
    .in_clk   (in_clk),
    .mod      (mod),
    .frac_out (frac_out),
    .int_out  (int_out)
  );

  div3_50 u_div3 (
    .rst_n  (div3_rst_n),
    .in_clk (div3_in_clk),
    .out    (div3_out)
  );

endmodule
