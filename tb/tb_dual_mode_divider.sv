// tb_dual_mode_divider: self-checking test of the dual-mode divider, N = 7.
//
// The input half period is 5 time units. For a set of modulus words m the
// test checks that the fractional output has a period of 128 + m/2 input
// periods (256 + m half periods), that the integer output has a period of
// 256 + m input periods and is high for exactly half of it (50% duty cycle,
// also for odd ratios), and that the fractional output moves half an input
// period after the divider core output (strobe). A second phase changes m
// after every rising edge of the fractional output, as a delta-sigma
// modulator would, and checks every period against the word applied for it.
module tb_dual_mode_divider;

  localparam int HALF = 5;
  localparam int N    = 7;

  logic         rst_n = 1'b0, in_clk = 1'b0, frac_out, int_out;
  logic [N:0]   mod = '0;
  int           checks = 0, failures = 0;

  dual_mode_divider #(.N(N)) dut (
    .rst_n(rst_n), .in_clk(in_clk), .mod(mod), .frac_out(frac_out), .int_out(int_out)
  );

  always #(HALF) in_clk = ~in_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Strobe: every edge of frac_out comes half an input period after the
  // corresponding edge of the core output.
  time t_core = 0;
  bit  strobe_armed = 1'b0;   // set once the outputs run after reset
  always @(posedge dut.core_out) t_core = $time;
  always @(posedge frac_out) if (strobe_armed) check($time - t_core == HALF, "fractional output not half a period after the core output");

  // Integer output high and low times.
  time t_int_rise = 0, t_int_high = 0, t_int_low = 0;
  always @(posedge int_out) begin t_int_low = $time - t_int_rise - t_int_high; t_int_rise = $time; end
  always @(negedge int_out) t_int_high = $time - t_int_rise;

  task automatic test_word(input int m);
    time t0, t1, t2, t3;
    int  exp_h;
    exp_h = (1 << (N + 1)) + m;
    @(posedge frac_out); #1 mod = m[N:0];
    // Align to a rising edge of int_out so both its phases use word m.
    @(posedge int_out); t0 = $time;
    @(posedge frac_out); t1 = $time;
    @(posedge int_out); t2 = $time;
    t3 = t_int_high;
    check(t1 - t0 == exp_h * HALF, $sformatf("m=%0d fractional period %0d halves, expected %0d", m, (t1 - t0) / HALF, exp_h));
    check(t2 - t0 == 2 * exp_h * HALF, $sformatf("m=%0d integer period %0d halves, expected %0d", m, (t2 - t0) / HALF, 2 * exp_h));
    check(t3 == exp_h * HALF, $sformatf("m=%0d integer high time %0d halves, expected %0d", m, t3 / HALF, exp_h));
  endtask

  initial begin
    int  m_list[$] = '{0, 1, 2, 3, 64, 127, 128, 129, 170, 254, 255};
    int  m;
    time t0, t1;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge frac_out);
    strobe_armed = 1'b1;
    foreach (m_list[i]) test_word(m_list[i]);
    repeat (10) test_word(int'($urandom_range(0, 255)));
    // Word changed every output period.
    @(posedge frac_out);
    repeat (60) begin
      t0 = $time;
      m  = int'($urandom_range(0, 255));
      #1 mod = m[N:0];
      @(posedge frac_out); t1 = $time;
      check(t1 - t0 == ((1 << (N + 1)) + m) * HALF, $sformatf("per-period word m=%0d: period %0d halves", m, (t1 - t0) / HALF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF * 2 * 512 * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
