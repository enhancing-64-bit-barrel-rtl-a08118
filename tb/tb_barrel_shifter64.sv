// End-to-end testbench for the barrel_shifter64 top at its default size
// (64 bits, no parameter override).
//
// Presents a stream of operations, one per clock, with in_valid sometimes low,
// and checks that each result appears on data_out with out_valid high exactly
// one clock edge after the operation was presented, and that data_out holds its
// value while in_valid is low. Expected words come from the language's shift
// operators. It counts how often each mechanism of the design was exercised:
// left and right logical shifts, arithmetic right shifts that filled with ones,
// left and right rotates, a bypass by distance 0, the full distance 63, and an
// idle cycle holding the output. A mechanism that never happened is a failure.
module tb_barrel_shifter64;
  import bs_pkg::*;

  localparam int unsigned WIDTH = DATA_W;
  localparam int unsigned SW    = $clog2(WIDTH);
  localparam int          N_OPS = 3000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid;
  logic [WIDTH-1:0] data_in;
  logic [SW-1:0]    shamt;
  dir_e             dir;
  mode_e            mode;
  logic             out_valid;
  logic [WIDTH-1:0] data_out;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int n_shl, n_shr, n_sar_ones, n_rol, n_ror, n_zero, n_full, n_hold;

  barrel_shifter64 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .data_in(data_in),
    .shamt(shamt), .dir(dir), .mode(mode), .out_valid(out_valid), .data_out(data_out)
  );

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] model(input logic [WIDTH-1:0] w, input int s,
                                             input dir_e dr, input mode_e md);
    logic signed [WIDTH-1:0] sw;
    sw = w;
    case (md)
      MODE_ROTATE:
        if (s == 0) return w;
        else if (dr == DIR_LEFT) return (w << s) | (w >> (WIDTH - s));
        else return (w >> s) | (w << (WIDTH - s));
      MODE_SHIFT_ARITH:
        if (dr == DIR_LEFT) return w << s;
        else return sw >>> s;
      default:
        if (dr == DIR_LEFT) return w << s;
        else return w >> s;
    endcase
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (N_OPS * 2 + 100) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expected;
    logic [WIDTH-1:0] held;
    logic             pend;
    int               cycle_in;
    int               cycle;
    int               s;

    rst_n    = 1'b0;
    in_valid = 1'b0;
    data_in  = '0;
    shamt    = '0;
    dir      = DIR_LEFT;
    mode     = MODE_SHIFT_LOGICAL;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || data_out !== '0) fail("outputs not cleared by reset");
    rst_n = 1'b1;

    pend  = 1'b0;
    cycle = 0;
    for (int op = 0; op < N_OPS; op++) begin
      // choose the next operation; the first ones replay the published vector
      // and the corner distances, the rest are random
      if (op == 0) begin
        data_in = 64'hAAAA_AAAA_AAAA_AAAA; s = 8; dir = DIR_RIGHT; mode = MODE_SHIFT_LOGICAL;
        in_valid = 1'b1;
      end else begin
        data_in  = {$urandom, $urandom};
        s        = (op % 17 == 0) ? 0 : (op % 19 == 0) ? WIDTH - 1 : int'($urandom_range(WIDTH - 1));
        dir      = dir_e'($urandom_range(1));
        mode     = mode_e'($urandom_range(2));
        in_valid = ($urandom_range(9) != 0);
      end
      shamt = SW'(s);

      held = data_out;
      @(posedge clk);
      cycle++;
      #1;

      if (in_valid) begin
        expected = model(data_in, s, dir, mode);
        checks++;
        if (out_valid !== 1'b1) fail($sformatf("out_valid low one cycle after op %0d", op));
        checks++;
        if (data_out !== expected)
          fail($sformatf("op %0d d=%h s=%0d %s %s out=%h expected=%h",
                         op, data_in, s, dir.name(), mode.name(), data_out, expected));
        if (op == 0) begin
          checks++;
          if (data_out !== 64'h00AA_AAAA_AAAA_AAAA) fail("published shift-right vector");
        end
        // mechanism coverage
        if (mode == MODE_SHIFT_LOGICAL && dir == DIR_LEFT  && s != 0) n_shl++;
        if (mode == MODE_SHIFT_LOGICAL && dir == DIR_RIGHT && s != 0) n_shr++;
        if (mode == MODE_SHIFT_ARITH && dir == DIR_RIGHT && s != 0 && data_in[WIDTH-1]) n_sar_ones++;
        if (mode == MODE_ROTATE && dir == DIR_LEFT  && s != 0) n_rol++;
        if (mode == MODE_ROTATE && dir == DIR_RIGHT && s != 0) n_ror++;
        if (s == 0) n_zero++;
        if (s == WIDTH - 1) n_full++;
      end else begin
        checks++;
        if (out_valid !== 1'b0) fail($sformatf("out_valid high after idle cycle %0d", op));
        checks++;
        if (data_out !== held) fail($sformatf("data_out changed on idle cycle %0d", op));
        n_hold++;
      end
    end

    $display("mechanisms: shl=%0d shr=%0d sar_ones=%0d rol=%0d ror=%0d dist0=%0d dist63=%0d hold=%0d",
             n_shl, n_shr, n_sar_ones, n_rol, n_ror, n_zero, n_full, n_hold);
    checks++; if (n_shl == 0)      fail("logical left shift never exercised");
    checks++; if (n_shr == 0)      fail("logical right shift never exercised");
    checks++; if (n_sar_ones == 0) fail("arithmetic sign fill never exercised");
    checks++; if (n_rol == 0)      fail("left rotate never exercised");
    checks++; if (n_ror == 0)      fail("right rotate never exercised");
    checks++; if (n_zero == 0)     fail("distance 0 never exercised");
    checks++; if (n_full == 0)     fail("distance 63 never exercised");
    checks++; if (n_hold == 0)     fail("idle hold never exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
