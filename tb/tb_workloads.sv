// tb_workloads: the measured operating points of the divider, run at their
// real input frequencies.
//
//  1. Fractional output, modulus 255.5 (word 255), 2.56 GHz input:
//     expected 2.56 GHz / 255.5 = 10.0196 MHz (measured on silicon: 10.02 MHz).
//  2. Integer output, modulus 511 (word 255), 1.28 GHz input:
//     expected 1.28 GHz / 511 = 2.5049 MHz with 50% duty cycle
//     (measured: 2.504 MHz, 50% duty).
//  3. Divide-by-three circuit, 2.6 GHz input: expected 866.7 MHz, 50% duty.
// Each output frequency is measured over several periods and compared with
// the expected value to 1e-4; the first two are also compared with the
// measured silicon values to 0.1%.
module tb_workloads;
  timeunit 1ps;
  timeprecision 1fs;

  logic       rst_n = 1'b0, in_clk = 1'b0, frac_out, int_out;
  logic [7:0] mod = 8'd255;
  logic       div3_rst_n = 1'b0, div3_in_clk = 1'b0, div3_out;
  int         checks = 0, failures = 0;
  realtime    half = 195.3125;     // half input period in ps, set per test
  realtime    half3 = 1.0e12 / 2.6e9 / 2.0;

  fdiv_top dut (
    .rst_n(rst_n), .in_clk(in_clk), .mod(mod), .frac_out(frac_out), .int_out(int_out),
    .div3_rst_n(div3_rst_n), .div3_in_clk(div3_in_clk), .div3_out(div3_out)
  );

  always #(half)  in_clk      = ~in_clk;
  always #(half3) div3_in_clk = ~div3_in_clk;

  task automatic check_close(input real got, input real want, input real tol, input string what);
    checks++;
    if ((got - want) > tol * want || (want - got) > tol * want) begin
      failures++;
      $display("FAIL: %s: %f, expected %f", what, got, want);
    end else
      $display("%s: %f (expected %f)", what, got, want);
  endtask

  initial begin
    realtime t0, t1, th;
    real     f_mhz, duty;
    // 1. Fractional mode, 255.5, 2.56 GHz.
    half = 1.0e12 / 2.56e9 / 2.0;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge frac_out);
    t0 = $realtime;
    repeat (4) @(posedge frac_out);
    t1 = $realtime;
    f_mhz = 4.0 / (t1 - t0) * 1.0e6;
    check_close(f_mhz, 2560.0 / 255.5, 1e-4, "fractional 255.5 @ 2.56 GHz, MHz");
    check_close(f_mhz, 10.02, 1e-3, "fractional 255.5 @ 2.56 GHz vs silicon, MHz");
    // 2. Integer mode, 511, 1.28 GHz.
    rst_n = 1'b0;
    half = 1.0e12 / 1.28e9 / 2.0;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge int_out);
    t0 = $realtime;
    @(negedge int_out);
    th = $realtime;
    repeat (2) @(posedge int_out);
    t1 = $realtime;
    f_mhz = 2.0 / (t1 - t0) * 1.0e6;
    duty  = (th - t0) / ((t1 - t0) / 2.0);
    check_close(f_mhz, 1280.0 / 511.0, 1e-4, "integer 511 @ 1.28 GHz, MHz");
    check_close(f_mhz, 2.504, 1e-3, "integer 511 @ 1.28 GHz vs silicon, MHz");
    check_close(duty, 0.5, 1e-4, "integer 511 duty cycle");
    // 3. Divide-by-three, 2.6 GHz.
    div3_rst_n = 1'b1;
    repeat (2) @(posedge div3_out);
    t0 = $realtime;
    @(negedge div3_out);
    th = $realtime;
    repeat (10) @(posedge div3_out);
    t1 = $realtime;
    f_mhz = 10.0 / (t1 - t0) * 1.0e6;
    duty  = (th - t0) / ((t1 - t0) / 10.0);
    check_close(f_mhz, 2600.0 / 3.0, 1e-4, "divide-by-three @ 2.6 GHz, MHz");
    check_close(duty, 0.5, 1e-3, "divide-by-three duty cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e7);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
