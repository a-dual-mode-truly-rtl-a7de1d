// tb_div2: self-checking test of the divide-by-two stage.
//
// The input has random high and low times. The output must change on every
// rising edge of the input and at no other time, so that it is high for one
// whole input period and low for the next (50% duty cycle of the output).
module tb_div2;

  logic rst_n = 1'b1, clk_in = 1'b0, clk_out;
  int   checks = 0, failures = 0;

  div2 dut (.rst_n(rst_n), .clk_in(clk_in), .clk_out(clk_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    logic prev;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    check(clk_out == 1'b0, "output not low after reset");
    repeat (200) begin
      prev = clk_out;
      #(1 + $urandom_range(0, 7)) clk_in = 1'b1;
      #1;
      check(clk_out == ~prev, "output did not toggle on a rising edge");
      prev = clk_out;
      #($urandom_range(0, 7)) clk_in = 1'b0;
      #1;
      check(clk_out == prev, "output changed on a falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
