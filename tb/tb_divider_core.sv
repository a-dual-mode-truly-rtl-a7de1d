// tb_divider_core: self-checking test of the divider core at N = 7.
//
// For every modulus word m = 0..255 the word is applied right after a rising
// edge of the core output, and the length of the period that this edge
// begins, and of the one after it, is compared with the ratio
//   T_OUT / T_IN = 2^7 + MOD_7 2^6 + ... + MOD_1 + 0.5 MOD_0 = 128 + m/2,
// i.e. 256 + m half input periods. The input half period is 5 time units.
module tb_divider_core;

  localparam int HALF = 5;
  localparam int N    = 7;

  logic         rst_n = 1'b0, in_clk = 1'b0, out;
  logic [N:0]   mod = '0;
  int           checks = 0, failures = 0;

  divider_core #(.N(N)) dut (.rst_n(rst_n), .in_clk(in_clk), .mod(mod), .out(out));

  always #(HALF) in_clk = ~in_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    time t0, t1, t2;
    int  exp_halves;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge out);
    for (int m = 0; m < (1 << (N + 1)); m++) begin
      @(posedge out); t0 = $time;
      #1 mod = m[N:0];
      @(posedge out); t1 = $time;
      @(posedge out); t2 = $time;
      exp_halves = (1 << (N + 1)) + m;
      check((t1 - t0) == exp_halves * HALF, $sformatf("m=%0d first period %0d halves, expected %0d", m, (t1 - t0) / HALF, exp_halves));
      check((t2 - t1) == exp_halves * HALF, $sformatf("m=%0d second period %0d halves, expected %0d", m, (t2 - t1) / HALF, exp_halves));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF * 2 * 512 * 4 * 260);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
