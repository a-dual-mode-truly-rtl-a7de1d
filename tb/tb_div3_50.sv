// tb_div3_50: self-checking test of the 50% duty-cycle divide-by-three.
//
// The input half period is 5 time units. Every output period must last 3
// input periods (30 units), with the output high for exactly 1.5 input
// periods (15 units).
module tb_div3_50;

  localparam int HALF = 5;

  logic rst_n = 1'b0, in_clk = 1'b0, out;
  int   checks = 0, failures = 0;

  div3_50 dut (.rst_n(rst_n), .in_clk(in_clk), .out(out));

  always #(HALF) in_clk = ~in_clk;

  initial begin
    time tr, tf, tr2;
    repeat (3) @(posedge in_clk);
    rst_n = 1'b1;
    @(posedge out);
    repeat (50) begin
      tr = $time;
      @(negedge out); tf = $time;
      @(posedge out); tr2 = $time;
      checks += 2;
      if (tr2 - tr != 6 * HALF) begin
        failures++;
        $display("FAIL: period %0t, expected %0d", tr2 - tr, 6 * HALF);
      end
      if (tf - tr != 3 * HALF) begin
        failures++;
        $display("FAIL: high time %0t, expected %0d", tf - tr, 3 * HALF);
      end
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
