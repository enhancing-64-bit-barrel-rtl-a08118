// One stage of the logarithmic shifter: a row of WIDTH 2:1 multiplexers.
//
// When en is 1 the word moves DIST places toward the most significant bit;
// the DIST vacated low bits take either the DIST bits that left the top
// (rotate = 1) or the fill bit (rotate = 0). When en is 0 the word passes
// unchanged. Interface: d, en, rotate, fill in; q out. Combinational.
// The shift/rotate block chains log2(WIDTH) of these with DIST = 1, 2, 4, ...
module shift_stage #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DIST  = 1
) (
  input  logic [WIDTH-1:0] d,
  input  logic             en,
  input  logic             rotate,
  input  logic             fill,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] moved;

  always_comb begin
    moved = d << DIST;
    for (int unsigned i = 0; i < DIST; i++) begin
      moved[i] = rotate ? d[WIDTH-DIST+i] : fill;
    end
    q = en ? moved : d;
  end

endmodule
