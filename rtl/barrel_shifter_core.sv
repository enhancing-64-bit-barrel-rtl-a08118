// Combinational barrel shifter datapath: Data In -> Input reversal ->
// Shift/Rotate -> Output reversal -> Data Out.
//
// Only a left shifter/rotator is built. A right operation reverses the bit
// order of the word, shifts or rotates it left by shamt places and reverses it
// back, which is the same as moving the original word right. Both reversal
// blocks are driven by the direction control. For an arithmetic right shift the
// bits shifted in are copies of data_in's sign bit; an arithmetic left shift is
// the same as a logical one (zero fill). Every shift distance 0..WIDTH-1 takes
// one pass through the logic, with no clock.
// Interface: data_in, shamt ("Select"), dir (Direction), mode (Shift/Rotate)
// in; data_out out.
// The chain of blocks and its controls follow the design's block diagram; the
// mode encoding and the sign-fill for arithmetic shifts are this design's own.
module barrel_shifter_core
  import bs_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0]         data_in,
  input  logic [$clog2(WIDTH)-1:0] shamt,
  input  dir_e                     dir,
  input  mode_e                    mode,
  output logic [WIDTH-1:0]         data_out
);

  logic             rev;
  logic             rotate;
  logic             fill;
  logic [WIDTH-1:0] reversed_in;
  logic [WIDTH-1:0] shifted;

  always_comb begin
    rev    = (dir == DIR_RIGHT);
    rotate = (mode == MODE_ROTATE);
    fill   = (mode == MODE_SHIFT_ARITH) && (dir == DIR_RIGHT) && data_in[WIDTH-1];
  end

  bit_reversal #(.WIDTH(WIDTH)) u_input_reversal (
    .rev (rev),
    .d   (data_in),
    .q   (reversed_in)
  );

  shift_rotate #(.WIDTH(WIDTH)) u_shift_rotate (
    .d      (reversed_in),
    .shamt  (shamt),
    .rotate (rotate),
    .fill   (fill),
    .q      (shifted)
  );

  bit_reversal #(.WIDTH(WIDTH)) u_output_reversal (
    .rev (rev),
    .d   (shifted),
    .q   (data_out)
  );

endmodule
