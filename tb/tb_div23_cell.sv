// tb_div23_cell: self-checking test of one 2/3 divider cell.
//
// The cell's input clock fin has a period of 10 time units. mod_in is driven
// as the next cell of the chain drives it: raised at a rising edge of fout
// and held for one fout period, in a chosen pattern of periods. For every
// fout period the test checks that it lasts 3 fin periods when mod_in was
// active and p set, 2 otherwise, and that mod_out is high for exactly one fin
// period (the second of the fout period) when mod_in was active, never
// otherwise. Runs with mod_in tied high (last cell of the chain) and pulsed.
module tb_div23_cell;

  localparam int PER = 10;

  logic rst_n = 1'b0, fin = 1'b0, p = 1'b0, mod_in = 1'b0, fout, mod_out;
  int   checks = 0, failures = 0;

  div23_cell dut (.rst_n(rst_n), .fin(fin), .p(p), .mod_in(mod_in), .fout(fout), .mod_out(mod_out));

  always #(PER / 2) fin = ~fin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Runs n fout periods. active(k) decides whether mod_in is high in period k.
  // Starts right after a rising edge of fout.
  task automatic run(input int n, input int every);
    int  len, mo_cnt, mo_pos;
    bit  act;
    for (int k = 0; k < n; k++) begin
      act    = (every != 0) && (k % every == 0);
      mod_in = act;
      len = 0; mo_cnt = 0; mo_pos = 0;
      // Count fin periods until the next rising edge of fout.
      do begin
        @(posedge fin); #1;
        len++;
        if (mod_out) begin mo_cnt++; mo_pos = len; end
      end while (!fout);
      check(len == ((act && p) ? 3 : 2), $sformatf("fout period %0d fin periods, p=%0b act=%0b", len, p, act));
      check(mo_cnt == (act ? 1 : 0), $sformatf("mod_out high for %0d fin periods, act=%0b", mo_cnt, act));
      if (act) check(mo_pos == 1, "mod_out not in the second fin period of the fout period");
    end
  endtask

  initial begin
    repeat (2) @(posedge fin);
    #1 rst_n = 1'b1;
    // Align to a rising edge of fout.
    do begin @(posedge fin); #1; end while (!fout);
    p = 1'b0; run(10, 1);   // last cell, divide by 2
    p = 1'b1; run(10, 1);   // last cell, divide by 3
    p = 1'b1; run(24, 4);   // feedback once every 4 periods
    p = 1'b0; run(24, 3);
    p = 1'b1; run(12, 0);   // no feedback: never divides by 3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PER * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
