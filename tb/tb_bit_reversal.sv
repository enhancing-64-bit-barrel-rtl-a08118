// Self-checking testbench for bit_reversal (the input and output reversal
// blocks). Drives walking-one words, fixed patterns and random words, with rev
// low and high, and compares q with a reference made by the streaming
// operator, which reverses bit order independently of the block's loop.
// Also checks that reversing twice gives the original word back.
module tb_bit_reversal;

  localparam int unsigned WIDTH = 64;

  logic             rev;
  logic [WIDTH-1:0] d;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] q2;

  int checks   = 0;
  int failures = 0;

  bit_reversal #(.WIDTH(WIDTH)) dut (.rev(rev), .d(d), .q(q));
  bit_reversal #(.WIDTH(WIDTH)) dut_back (.rev(rev), .d(q), .q(q2));

  task automatic check_one(input logic r, input logic [WIDTH-1:0] word);
    logic [WIDTH-1:0] expected;
    rev = r;
    d   = word;
    #1;
    expected = r ? {<<{word}} : word;
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL rev=%0b d=%h q=%h expected=%h", r, word, q, expected);
    end
    checks++;
    if (q2 !== word) begin
      failures++;
      $display("FAIL double reversal rev=%0b d=%h back=%h", r, word, q2);
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
    for (int i = 0; i < WIDTH; i++) begin
      check_one(1'b1, WIDTH'(1) << i);
      check_one(1'b0, WIDTH'(1) << i);
    end
    check_one(1'b1, 64'h0123_4567_89AB_CDEF);
    check_one(1'b1, 64'h8000_0000_0000_0001);
    check_one(1'b1, 64'hAAAA_AAAA_AAAA_AAAA);
    for (int i = 0; i < 200; i++) begin
      check_one(1'($urandom), {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
