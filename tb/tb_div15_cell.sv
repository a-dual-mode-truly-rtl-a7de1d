// tb_div15_cell: self-checking test of the 1/1.5 divider cell.
//
// The input clock has a half period of 5 time units. The test checks
//  - divide by 1: with MOD low, or FB_CTRL low, OUT changes on every edge;
//  - divide by 1.5: with both high, every OUT period is 3 half input periods
//    with OUT high for exactly one of them;
//  - single swallow: with MOD high and FB_CTRL raised for one OUT period, as
//    the next cell of the chain does, exactly that period lasts 1.5 input
//    periods and all others 1;
//  - in divide by 1, latch1 and latch2 hold constant, opposite values;
//  - in divide by 1.5, mux2 (the feedback) pulses once per OUT period.
// Expected values come from the required periods, not from the cell's logic.
module tb_div15_cell;

  localparam int HALF = 5;

  logic rst_n = 1'b0, in_clk = 1'b0, mod = 1'b0, fb_ctrl = 1'b0, out;
  int   checks = 0, failures = 0;

  div15_cell dut (.rst_n(rst_n), .in_clk(in_clk), .mod(mod), .fb_ctrl(fb_ctrl), .out(out));

  always #(HALF) in_clk = ~in_clk;

  // Times of the latest rising and falling edges of OUT.
  time t_rise = 0, t_rise_prev = 0, t_fall = 0;
  always @(posedge out) begin t_rise_prev = t_rise; t_rise = $time; end
  always @(negedge out) t_fall = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic step();
    @(posedge in_clk or negedge in_clk);
    #1;
  endtask

  // OUT must change on every edge for n edges.
  task automatic check_div1(input int n);
    logic prev, l1_0;
    prev = out;
    l1_0 = dut.l1_q;
    repeat (n) begin
      step();
      check(out != prev, "divide by 1: OUT did not change on an input edge");
      check(dut.l1_q == l1_0 && dut.l2_q == ~l1_0, "divide by 1: latch1/latch2 not constant and opposite");
      prev = out;
    end
  endtask

  // Rising edges of OUT and of mux2.
  int n_out_rise = 0, n_mux2_rise = 0;
  always @(posedge out) n_out_rise++;
  always @(posedge dut.mux2_q) n_mux2_rise++;

  initial begin
    repeat (3) step();
    rst_n = 1'b1;
    // Divide by 1 with MOD low.
    mod = 1'b0; fb_ctrl = 1'b1;
    step();
    check_div1(20);
    // Divide by 1 with FB_CTRL low.
    mod = 1'b1; fb_ctrl = 1'b0;
    step();
    check_div1(20);
    // Divide by 1.5 continuously.
    mod = 1'b1; fb_ctrl = 1'b1;
    repeat (6) step();
    n_out_rise = 0; n_mux2_rise = 0;
    repeat (10) begin
      @(posedge out); #1;
      if (t_rise_prev != 0) begin
        check(t_rise - t_rise_prev == 3 * HALF, "divide by 1.5: period is not 1.5 input periods");
        check(t_fall > t_rise_prev && t_fall - t_rise_prev == HALF, "divide by 1.5: high time is not half an input period");
      end
    end
    check(n_out_rise == 10 && (n_mux2_rise == 10 || n_mux2_rise == 9), "divide by 1.5: mux2 does not pulse once per OUT period");
    // Single swallow: FB_CTRL high for one OUT period.
    fb_ctrl = 1'b0;
    repeat (4) begin
      repeat (3) @(posedge out);
      #1 fb_ctrl = 1'b1;
      @(posedge out); #1;
      fb_ctrl = 1'b0;
      check(t_rise - t_rise_prev == 3 * HALF, "single swallow: stretched period is not 1.5 input periods");
      @(posedge out); #1;
      check(t_rise - t_rise_prev == 2 * HALF, "single swallow: following period is not 1 input period");
      @(posedge out); #1;
      check(t_rise - t_rise_prev == 2 * HALF, "single swallow: second following period is not 1 input period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
