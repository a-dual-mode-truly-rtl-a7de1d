// tb_fdiv_top: end-to-end test of the whole design at its default size
// (modulus word of 8 bits, seven 2/3 cells).
//
// The divider input half period is 5 time units; the divide-by-three circuit
// runs at the same time from its own clock (half period 7).
//  Phase 1: every modulus word m = 0..255 in turn. Fractional output period
//           256 + m half input periods (ratio 128 .. 255.5), integer output
//           period twice that and high for exactly half of it (ratio
//           256 .. 511, 50% duty cycle for odd ratios too).
//  Phase 2: a new random word after every rising edge of the fractional
//           output, checked period by period.
//  Throughout: divide-by-three output period 6 half periods, high for 3.
// The test counts how often each mechanism of the design took place: the
// half-period swallow of the 1/1.5 cell, the divide-by-3 of each 2/3 cell,
// the strobe re-timing, odd integer ratios, per-period word changes and the
// divide-by-three periods; a mechanism that never happened is a failure.
module tb_fdiv_top
  import fdiv_pkg::*;
;

  localparam int HALF  = 5;
  localparam int HALF3 = 7;
  localparam int N     = N_DEFAULT;

  logic         rst_n = 1'b0, in_clk = 1'b0, frac_out, int_out;
  logic [N:0]   mod = '0;
  logic         div3_rst_n = 1'b0, div3_in_clk = 1'b0, div3_out;
  int           checks = 0, failures = 0;

  fdiv_top dut (
    .rst_n(rst_n), .in_clk(in_clk), .mod(mod), .frac_out(frac_out), .int_out(int_out),
    .div3_rst_n(div3_rst_n), .div3_in_clk(div3_in_clk), .div3_out(div3_out)
  );

  always #(HALF)  in_clk      = ~in_clk;
  always #(HALF3) div3_in_clk = ~div3_in_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---- mechanism counters -------------------------------------------------
  int n_half_swallow = 0;          // 1/1.5 cell held OUT low an extra half period
  int n_div3[N+1:2];               // 2/3 cell k divided by 3
  int n_strobe = 0;                // fractional edge re-timed half a period after the core
  int n_odd_int = 0;               // odd integer ratio checked with 50% duty
  int n_word_change = 0;           // word changed between consecutive periods
  int n_div3_periods = 0;          // divide-by-three periods checked

  initial for (int k = 2; k <= N + 1; k++) n_div3[k] = 0;

  always @(negedge dut.u_divider.u_core.u_cell1.fb_n) if (rst_n) n_half_swallow++;

  for (genvar k = 2; k <= N + 1; k++) begin : g_mon
    always @(posedge dut.u_divider.u_core.g_cell[k].u_cell.swallow) if (rst_n) n_div3[k]++;
  end

  time t_core = 0;
  bit  strobe_armed = 1'b0;   // set once the outputs run after reset
  always @(posedge dut.u_divider.core_out) t_core = $time;
  always @(posedge frac_out) if (strobe_armed) begin
    check($time - t_core == HALF, "fractional output not half a period after the core output");
    n_strobe++;
  end

  time t_int_rise = 0, t_int_high = 0;
  always @(posedge int_out) t_int_rise = $time;
  always @(negedge int_out) t_int_high = $time - t_int_rise;

  // ---- divide-by-three, checked in the background --------------------------
  initial begin
    time tr, tf, tr2;
    repeat (3) @(posedge div3_in_clk);
    div3_rst_n = 1'b1;
    @(posedge div3_out);
    forever begin
      tr = $time;
      @(negedge div3_out); tf = $time;
      @(posedge div3_out); tr2 = $time;
      check(tr2 - tr == 6 * HALF3, "divide-by-three period is not 3 input periods");
      check(tf - tr == 3 * HALF3, "divide-by-three high time is not 1.5 input periods");
      n_div3_periods++;
    end
  end

  // ---- programmable divider -----------------------------------------------
  initial begin
    time t0, t1, t2;
    int  exp_h, m, m_prev;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge frac_out);
    strobe_armed = 1'b1;
    // Phase 1: all words.
    for (m = 0; m < (1 << (N + 1)); m++) begin
      exp_h = (1 << (N + 1)) + m;
      @(posedge frac_out); #1 mod = m[N:0];
      @(posedge int_out); t0 = $time;
      @(posedge frac_out); t1 = $time;
      @(posedge int_out); t2 = $time;
      check(t1 - t0 == exp_h * HALF, $sformatf("m=%0d fractional period %0d halves, expected %0d", m, (t1 - t0) / HALF, exp_h));
      check(t2 - t0 == 2 * exp_h * HALF, $sformatf("m=%0d integer period %0d halves, expected %0d", m, (t2 - t0) / HALF, 2 * exp_h));
      check(t_int_high == exp_h * HALF, $sformatf("m=%0d integer output not 50%% duty", m));
      if (m % 2 == 1) n_odd_int++;
    end
    // Phase 2: a new word every period.
    m_prev = m - 1;
    @(posedge frac_out);
    repeat (300) begin
      t0 = $time;
      m  = int'($urandom_range(0, (1 << (N + 1)) - 1));
      #1 mod = m[N:0];
      @(posedge frac_out); t1 = $time;
      check(t1 - t0 == ((1 << (N + 1)) + m) * HALF, $sformatf("per-period word m=%0d: period %0d halves", m, (t1 - t0) / HALF));
      if (m != m_prev) n_word_change++;
      m_prev = m;
    end
    // Every mechanism must have happened.
    check(n_half_swallow > 0, "1/1.5 cell never swallowed half a period");
    for (int k = 2; k <= N + 1; k++)
      check(n_div3[k] > 0, $sformatf("2/3 cell %0d never divided by 3", k));
    check(n_strobe > 0, "strobe never re-timed an edge");
    check(n_odd_int > 0, "no odd integer ratio checked");
    check(n_word_change > 0, "word never changed between periods");
    check(n_div3_periods > 0, "divide-by-three never completed a period");
    $display("mechanisms: half-swallow=%0d strobe=%0d odd-integer=%0d word-changes=%0d div3-periods=%0d",
             n_half_swallow, n_strobe, n_odd_int, n_word_change, n_div3_periods);
    for (int k = 2; k <= N + 1; k++) $display("  2/3 cell %0d divide-by-3: %0d", k, n_div3[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF * 2 * 512 * 1200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
