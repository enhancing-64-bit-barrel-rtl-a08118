// Word-size testbench: the same barrel shifter datapath built at 8, 16, 32
// and 64 bits (the common word sizes, needing 24, 64, 160 and 384 two-input
// multiplexers in the shift/rotate stage). Every instance gets the same random
// operations, masked to its width, and each result is compared with a
// reference that works on a 64-bit variable and a width argument, so one
// function serves all four sizes.
module tb_word_sizes;
  import bs_pkg::*;

  logic [63:0] din;
  logic [5:0]  s;
  dir_e        dir;
  mode_e       mode;

  logic [7:0]  q8;
  logic [15:0] q16;
  logic [31:0] q32;
  logic [63:0] q64;

  int checks   = 0;
  int failures = 0;

  barrel_shifter_core #(.WIDTH(8))  u8  (.data_in(din[7:0]),  .shamt(s[2:0]), .dir(dir), .mode(mode), .data_out(q8));
  barrel_shifter_core #(.WIDTH(16)) u16 (.data_in(din[15:0]), .shamt(s[3:0]), .dir(dir), .mode(mode), .data_out(q16));
  barrel_shifter_core #(.WIDTH(32)) u32 (.data_in(din[31:0]), .shamt(s[4:0]), .dir(dir), .mode(mode), .data_out(q32));
  barrel_shifter_core #(.WIDTH(64)) u64 (.data_in(din),       .shamt(s),      .dir(dir), .mode(mode), .data_out(q64));

  // Reference for a w-bit word held in the low bits of a 64-bit variable:
  // built bit by bit from the definition of each operation.
  function automatic logic [63:0] model(input logic [63:0] d, input int w, input int sh,
                                        input dir_e dr, input mode_e md);
    logic [63:0] r;
    int          src;
    r = '0;
    for (int i = 0; i < w; i++) begin
      src = (dr == DIR_LEFT) ? i - sh : i + sh;
      if (md == MODE_ROTATE)      r[i] = d[(src % w + w) % w];
      else if (src >= 0 && src < w) r[i] = d[src];
      else if (md == MODE_SHIFT_ARITH && dr == DIR_RIGHT) r[i] = d[w-1];
      else                        r[i] = 1'b0;
    end
    return r;
  endfunction

  task automatic compare(input int w, input logic [63:0] got);
    logic [63:0] mask;
    logic [63:0] expected;
    mask     = (w == 64) ? '1 : ((64'd1 << w) - 1);
    expected = model(din & mask, w, int'(s) % w, dir, mode);
    checks++;
    if ((got & mask) !== expected) begin
      failures++;
      $display("FAIL w=%0d d=%h s=%0d %s %s out=%h expected=%h",
               w, din & mask, int'(s) % w, dir.name(), mode.name(), got, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      din  = {$urandom, $urandom};
      s    = 6'($urandom);
      dir  = dir_e'($urandom_range(1));
      mode = mode_e'($urandom_range(2));
      #1;
      compare(8,  64'(q8));
      compare(16, 64'(q16));
      compare(32, 64'(q32));
      compare(64, q64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
