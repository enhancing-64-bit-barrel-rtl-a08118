// Conditional bit reversal: the "Input reversal" and "Output reversal" blocks.
//
// When rev is 1 the output is the input with its bit order mirrored,
// q[i] = d[WIDTH-1-i]; when rev is 0 the word passes unchanged. It is one
// 2:1 multiplexer per bit. The barrel shifter places one instance before its
// left-only shift/rotate stage and one after it, both driven by the direction
// control, so that a right shift becomes reverse / shift left / reverse.
// Interface: rev, d[WIDTH-1:0] in; q[WIDTH-1:0] out. Purely combinational.
// The block and its place in the chain follow the design description; using
// it only for right operations is this design's choice.
module bit_reversal #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             rev,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mirrored;

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      mirrored[i] = d[WIDTH-1-i];
    end
    q = rev ? mirrored : d;
  end

endmodule
