// div23_cell: one 2/3 divider cell of the modular divider chain.
//
// The cell divides its input clock fin by 2, or by 3 once per division cycle
// of the whole chain. Each output period starts in state HI (fout high) and
// continues in LO (fout low); when the cell divides by 3 an extra state EX
// (fout low) is inserted. At the end of HI the cell samples mod_in, the
// feedback control that the next cell raises for one of its input periods
// (= one output period of this cell) once per division cycle. If mod_in is
// high, the cell raises mod_out for the next input period (state LO), which
// is exactly one output period of the previous cell, and, if its modulus bit
// p is also set, it inserts EX. In the last cell mod_in is tied high, so the
// last cell starts the feedback once per period of the chain output.
//
// The published design only places these cells behind the 1/1.5 cell and
// refers to an existing 2/3 cell for their insides; this state machine is
// this design's own implementation of the same function, built from
// rising-edge flip-flops instead of latches. The asynchronous active-low reset
// is this design's addition.
//
// Interface: fin is the cell's input clock (the previous cell's output), p its
// modulus bit, mod_in the FB_CTRL from the next cell, fout the output clock to
// the next cell, mod_out the FB_CTRL to the previous cell. Timing: fout and
// mod_out change only on rising edges of fin; mod_in is sampled on the rising
// edge of fin that ends state HI.
module div23_cell
  import fdiv_pkg::*;
(
  input  logic rst_n,
  input  logic fin,
  input  logic p,
  input  logic mod_in,
  output logic fout,
  output logic mod_out
);

  c23_state_e state;
  logic       swallow;   // divide by 3 in this output period

  always_ff @(posedge fin or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C23_HI;
      mod_out <= 1'b0;
      swallow <= 1'b0;
    end else begin
      unique case (state)
        C23_HI: begin
          state   <= C23_LO;
          mod_out <= mod_in;
          swallow <= mod_in & p;
        end
        C23_LO: begin
          mod_out <= 1'b0;
          state   <= swallow ? C23_EX : C23_HI;
        end
        C23_EX: begin
          swallow <= 1'b0;
          state   <= C23_HI;
        end
        default: state <= C23_HI;
      endcase
    end
  end

  assign fout = (state == C23_HI);

endmodule
