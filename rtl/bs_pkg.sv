// Shared types and constants of the 64-bit barrel shifter.
//
// The shifter has two controls besides the data word and the shift distance
// ("Select"): a direction and an operation. The direction picks left or right;
// right operations are done by reversing the word around a left-only shift/
// rotate stage. The operation picks a logical shift (zero fill), an arithmetic
// shift (sign fill on right shifts) or a rotate. Left/right and
// logical/arithmetic shifts plus rotation follow the design description; the
// binary encodings below are this design's own choice.
package bs_pkg;

  // Word width of the proposed design.
  localparam int unsigned DATA_W = 64;

  typedef enum logic {
    DIR_LEFT  = 1'b0,   // toward the most significant bit
    DIR_RIGHT = 1'b1    // toward the least significant bit
  } dir_e;

  typedef enum logic [1:0] {
    MODE_SHIFT_LOGICAL = 2'd0,  // vacated bits are zero
    MODE_SHIFT_ARITH   = 2'd1,  // right: vacated bits copy the sign bit; left: zero
    MODE_ROTATE        = 2'd2   // bits leaving one end re-enter at the other
  } mode_e;

endpackage
