// fdiv_pkg: types and constants shared by the fractional divider.
//
// The divider is a ripple chain of divider cells: a 1/1.5 cell that works on
// both edges of the input clock, followed by N 2/3 cells, each clocked by the
// output of the cell before it. The package holds the default chain length
// (seven 2/3 cells, an 8-bit modulus word, as in the built prototype) and the
// state encoding of the 2/3 cell, whose insides are this design's own.
package fdiv_pkg;

  // Number of 2/3 cells behind the 1/1.5 cell. The modulus word is N+1 bits.
  localparam int unsigned N_DEFAULT = 7;

  // States of one 2/3 cell, one state per period of the cell's input clock.
  //   HI : output high (first input period of an output period)
  //   LO : output low  (second input period)
  //   EX : output low, extra input period inserted when the cell divides by 3
  typedef enum logic [1:0] {
    C23_HI = 2'd0,
    C23_LO = 2'd1,
    C23_EX = 2'd2
  } c23_state_e;

endpackage
