// tb_strobe: self-checking test of the strobe (dual-edge re-timing).
//
// Random data changes in the middle of each half period of the input clock;
// after every edge, rising or falling, the output must equal the value the
// data had just d_seen that edge.
module tb_strobe;

  localparam int HALF = 5;

  logic rst_n = 1'b0, in_clk = 1'b0, d = 1'b0, q;
  int   checks = 0, failures = 0;

  strobe dut (.rst_n(rst_n), .in_clk(in_clk), .d(d), .q(q));

  always #(HALF) in_clk = ~in_clk;

  initial begin
    logic d_seen;
    repeat (2) @(posedge in_clk);
    #1 rst_n = 1'b1;
    repeat (400) begin
      @(posedge in_clk or negedge in_clk);
      d_seen = d;
      #1;
      checks++;
      if (q !== d_seen) begin
        failures++;
        $display("FAIL at %0t: q=%0b expected %0b", $time, q, d_seen);
      end
      #1 d = ($urandom % 2) != 0;
      #1;
      checks++;
      if (q !== d_seen) begin
        failures++;
        $display("FAIL at %0t: q changed between edges", $time);
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
