// Self-checking testbench for shift_rotate, the logarithmic left
// shifter/rotator. Checks every shift distance with random words at 64 bits,
// in shift mode with fill 0 and 1 and in rotate mode, against a reference
// built from a double-width word: a rotate is the upper half of {d,d} shifted,
// a shift is d shifted with the low shamt bits set to fill.
// Two small instances replay the examples the design description gives: an
// 8-bit shifter where select bit 0 alone moves D0..D6 to Q1..Q7, and a 4-bit
// rotator that turns ABCD into every cyclic order without losing a bit.
module tb_shift_rotate;

  localparam int unsigned WIDTH = 64;
  localparam int unsigned SW    = $clog2(WIDTH);

  logic [WIDTH-1:0] d;
  logic [SW-1:0]    shamt;
  logic             rotate;
  logic             fill;
  logic [WIDTH-1:0] q;

  // 8-bit instance for the S0/S1/S2 example
  logic [7:0] d8, q8;
  logic [2:0] s8;
  // 4-bit instance for the ABCD rotation example
  logic [3:0] d4, q4;
  logic [1:0] s4;

  int checks   = 0;
  int failures = 0;

  shift_rotate #(.WIDTH(WIDTH)) dut (
    .d(d), .shamt(shamt), .rotate(rotate), .fill(fill), .q(q)
  );
  shift_rotate #(.WIDTH(8)) dut8 (
    .d(d8), .shamt(s8), .rotate(1'b0), .fill(1'b0), .q(q8)
  );
  shift_rotate #(.WIDTH(4)) dut4 (
    .d(d4), .shamt(s4), .rotate(1'b1), .fill(1'b0), .q(q4)
  );

  function automatic logic [WIDTH-1:0] model(input logic [WIDTH-1:0] w,
                                             input int s, input logic rot,
                                             input logic f);
    logic [2*WIDTH-1:0] wide;
    logic [WIDTH-1:0]   r;
    if (rot) begin
      wide = {w, w} << s;
      return wide[2*WIDTH-1:WIDTH];
    end
    r = w << s;
    for (int i = 0; i < s; i++) r[i] = f;
    return r;
  endfunction

  task automatic check_one(input logic [WIDTH-1:0] w, input int s,
                           input logic rot, input logic f);
    logic [WIDTH-1:0] expected;
    d = w; shamt = SW'(s); rotate = rot; fill = f;
    #1;
    expected = model(w, s, rot, f);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL d=%h s=%0d rot=%0b fill=%0b q=%h expected=%h", w, s, rot, f, q, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < WIDTH; s++) begin
      for (int n = 0; n < 6; n++) begin
        logic [WIDTH-1:0] w;
        w = {$urandom, $urandom};
        check_one(w, s, 1'b0, 1'b0);
        check_one(w, s, 1'b0, 1'b1);
        check_one(w, s, 1'b1, 1'b0);
      end
      check_one(64'h8000_0000_0000_0001, s, 1'b1, 1'b0);
    end

    // 8-bit example: only S0 set passes D0..D6 to Q1..Q7.
    d8 = 8'b1011_0110; s8 = 3'b001;
    #1;
    checks++;
    if (q8[7:1] !== d8[6:0] || q8[0] !== 1'b0) begin
      failures++;
      $display("FAIL 8-bit S0 example d=%b q=%b", d8, q8);
    end

    // 4-bit example: A,B,C,D = bits 3..0 rotate into every cyclic order.
    d4 = 4'b1000;  // only A set, so each order shows where A went
    for (int s = 0; s < 4; s++) begin
      s4 = 2'(s);
      #1;
      checks++;
      if (q4 !== 4'(({d4, d4} << s) >> 4)) begin
        failures++;
        $display("FAIL 4-bit rotation s=%0d q=%b", s, q4);
      end
      checks++;
      if ($countones(q4) != 1) begin
        failures++;
        $display("FAIL 4-bit rotation lost a bit s=%0d q=%b", s, q4);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
