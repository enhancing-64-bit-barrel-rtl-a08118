// 64-bit barrel shifter, top level.
//
// Shifts or rotates a WIDTH-bit word left or right by 0..WIDTH-1 places in a
// single clock cycle. The inputs feed the combinational datapath (input
// reversal, logarithmic shift/rotate stage, output reversal) and the result is
// captured in a WIDTH-bit output register on the rising clock edge of a cycle in
// which in_valid is high; out_valid rises with it. The register loads only on
// in_valid, so with no new operation the output and the logic after the
// register do not toggle.
// Interface: clk, rst_n (asynchronous, active low), in_valid, data_in, shamt
// ("Select"), dir (Direction), mode (Shift/Rotate); out_valid, data_out.
// Timing: an operation presented in cycle n is on data_out, with out_valid
// high, after the edge that ends cycle n. A new operation may start every cycle.
// The datapath and the one-cycle operation follow the design description; the
// output register, the valid handshake and the reset are this design's choice.
// Lint reports rst_n as used both asynchronously and synchronously:
// the synchronous use is only the assertions' "disable iff", not logic.
module barrel_shifter64
  import bs_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [WIDTH-1:0]         data_in,
  input  logic [$clog2(WIDTH)-1:0] shamt,
  input  dir_e                     dir,
  input  mode_e                    mode,
  output logic                     out_valid,
  output logic [WIDTH-1:0]         data_out
);

  logic [WIDTH-1:0] result;

  barrel_shifter_core #(.WIDTH(WIDTH)) u_core (
    .data_in  (data_in),
    .shamt    (shamt),
    .dir      (dir),
    .mode     (mode),
    .data_out (result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        data_out <= result;
      end
    end
  end

  // A rotate never loses bits: the number of ones is preserved.
  a_rotate_keeps_ones: assert property (
    @(posedge clk) disable iff (!rst_n)
    (in_valid && mode == MODE_ROTATE) |=> ($countones(data_out) == $past($countones(data_in)))
  );

  // Mode 3 is not an operation.
  a_mode_legal: assert property (
    @(posedge clk) disable iff (!rst_n)
    in_valid |-> (mode inside {MODE_SHIFT_LOGICAL, MODE_SHIFT_ARITH, MODE_ROTATE})
  );

endmodule
