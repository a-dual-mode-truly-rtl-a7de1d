// dual_mode_divider: the complete dual-mode programmable divider.
//
// The divider core divides the input by X = 2^N + m/2 (m = modulus word), a
// multiple of 0.5. A strobe re-times the core output to the input edges; the
// result is the fractional output (ratio 128 .. 255.5 in steps of 0.5 for the
// default N = 7). A divide-by-two stage after it gives the integer output,
// ratio 2X = 2^(N+1) + m (256 .. 511) with a 50% duty cycle even when the
// ratio is odd. Both outputs are available at the same time; "mode" means
// which output is used.
//
// The block diagram (modulus buffer, core, strobe, level translator, /2)
// follows the published divider. The modulus buffer and the translation from
// source-coupled logic to CMOS levels carry no logic function and are plain
// wires here; the differential input pair is modelled as one single-ended
// clock. The reset is this design's addition.
//
// Interface: in_clk is the input signal, mod[k] is MOD_k (mod[0] drives the
// 1/1.5 cell), frac_out the fractional output, int_out the 50% duty-cycle
// integer output. Timing: frac_out follows the core output by half an input
// period; a modulus word changed within the first quarter of an output period
// (after a rising edge of frac_out) sets the length of that period.
module dual_mode_divider
  import fdiv_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         rst_n,
  input  logic         in_clk,
  input  logic [N:0]   mod,
  output logic         frac_out,
  output logic         int_out
);

  logic core_out;

  divider_core #(.N(N)) u_core (
    .rst_n  (rst_n),
    .in_clk (in_clk),
    .mod    (mod),
    .out    (core_out)
  );

  strobe u_strobe (
    .rst_n  (rst_n),
    .in_clk (in_clk),
    .d      (core_out),
    .q      (frac_out)
  );

  div2 u_div2 (
    .rst_n   (rst_n),
    .clk_in  (frac_out),
    .clk_out (int_out)
  );

endmodule
