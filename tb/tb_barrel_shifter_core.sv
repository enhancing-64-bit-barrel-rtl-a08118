// Self-checking testbench for barrel_shifter_core, the combinational
// datapath. For every direction, every operation and every shift distance it
// applies random and corner-case words and compares data_out with the
// language's own operators: << and >> for logical shifts, >>> on a signed copy
// for the arithmetic right shift, and an OR of two shifts for rotates. It also
// applies the vector of the published shift-right simulation: data
// AAAA_AAAA_AAAA_AAAA shifted right by 8 (the expected word is computed here).
module tb_barrel_shifter_core;
  import bs_pkg::*;

  localparam int unsigned WIDTH = 64;
  localparam int unsigned SW    = $clog2(WIDTH);

  logic [WIDTH-1:0] data_in;
  logic [SW-1:0]    shamt;
  dir_e             dir;
  mode_e            mode;
  logic [WIDTH-1:0] data_out;

  int checks   = 0;
  int failures = 0;

  barrel_shifter_core #(.WIDTH(WIDTH)) dut (
    .data_in(data_in), .shamt(shamt), .dir(dir), .mode(mode), .data_out(data_out)
  );

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
        if (dr == DIR_LEFT) return w <<< s;
        else return sw >>> s;
      default:
        if (dr == DIR_LEFT) return w << s;
        else return w >> s;
    endcase
  endfunction

  task automatic check_one(input logic [WIDTH-1:0] w, input int s,
                           input dir_e dr, input mode_e md);
    logic [WIDTH-1:0] expected;
    data_in = w; shamt = SW'(s); dir = dr; mode = md;
    #1;
    expected = model(w, s, dr, md);
    checks++;
    if (data_out !== expected) begin
      failures++;
      $display("FAIL d=%h s=%0d dir=%s mode=%s out=%h expected=%h",
               w, s, dr.name(), md.name(), data_out, expected);
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
    mode_e modes [3] = '{MODE_SHIFT_LOGICAL, MODE_SHIFT_ARITH, MODE_ROTATE};
    dir_e  dirs  [2] = '{DIR_LEFT, DIR_RIGHT};

    // Published shift-right vector: data AAAA_AAAA_AAAA_AAAA, select 08.
    check_one(64'hAAAA_AAAA_AAAA_AAAA, 8, DIR_RIGHT, MODE_SHIFT_LOGICAL);
    checks++;
    if (data_out !== 64'h00AA_AAAA_AAAA_AAAA) begin
      failures++;
      $display("FAIL published vector: out=%h", data_out);
    end

    foreach (dirs[di]) begin
      foreach (modes[mi]) begin
        for (int s = 0; s < WIDTH; s++) begin
          check_one(64'h8000_0000_0000_0000, s, dirs[di], modes[mi]);
          check_one(64'hFFFF_FFFF_FFFF_FFFF, s, dirs[di], modes[mi]);
          check_one(64'h0123_4567_89AB_CDEF, s, dirs[di], modes[mi]);
          for (int n = 0; n < 4; n++) begin
            check_one({$urandom, $urandom}, s, dirs[di], modes[mi]);
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
