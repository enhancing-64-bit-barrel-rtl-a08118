// Shift/Rotate stage of the barrel shifter: a logarithmic left shifter/rotator.
//
// The word passes through log2(WIDTH) stages of 2:1 multiplexers. Stage k is
// controlled by select bit shamt[k] and, when that bit is set, moves the word
// 2^k places toward the most significant bit, so the stages together move it
// by shamt places in one pass: WIDTH*log2(WIDTH) multiplexers, 384 for 64 bits.
// In rotate mode the bits that leave the top re-enter at the bottom; in shift
// mode the vacated low bits take the fill bit (0 for logical shifts, the sign
// for an arithmetic right shift done through the reversal blocks).
// Interface: d[WIDTH-1:0], shamt[log2(WIDTH)-1:0], rotate, fill in;
// q[WIDTH-1:0] out. Purely combinational.
// The multiplexer stages, the select lines and the direction toward the more
// significant output (select bit 0 passes D0.. to Q1..) follow the design
// description; the fill input is this design's way of serving arithmetic shifts.
module shift_rotate #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]         d,
  input  logic [$clog2(WIDTH)-1:0] shamt,
  input  logic                     rotate,
  input  logic                     fill,
  output logic [WIDTH-1:0]         q
);

  localparam int unsigned STAGES = $clog2(WIDTH);

  // Word between stages: stage_data[0] is the input, stage_data[STAGES] the output.
  logic [WIDTH-1:0] stage_data [STAGES+1];

  assign stage_data[0] = d;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    shift_stage #(
      .WIDTH (WIDTH),
      .DIST  (2 ** k)
    ) u_stage (
      .d      (stage_data[k]),
      .en     (shamt[k]),
      .rotate (rotate),
      .fill   (fill),
      .q      (stage_data[k+1])
    );
  end

  assign q = stage_data[STAGES];

  initial begin
    assert (WIDTH >= 2 && (WIDTH & (WIDTH - 1)) == 0)
      else $error("shift_rotate: WIDTH must be a power of two, got %0d", WIDTH);
  end

endmodule
