// result_dram: result memory of the routing test circuit.
//
// Three LUTs configured as distributed RAM hold the outcome of a test: the
// two analyzer results and the start flag. They are read at the end of the
// test through configuration readback, so the test circuit needs no I/O.
//
// Writes go to word RESULT_ADDR of each LUT RAM:
//  - while the internal reset is high, all three words are cleared;
//  - afterwards a result word is written with 1 on every clock in which its
//    analyzer reports a mismatch, and never written back to 0, so a single
//    failing cycle is kept until the next configuration (sticky result);
//  - the start word is written with 1 once the start check fires.
// The use of one LUT per flag, the sticky write and the clearing during
// reset are this design's choices; the source says only that the results
// are kept in distributed RAM read back after the test.
//
// Interface: clk, rst are the internal clock and reset; result1/result2
// come straight from the analyzers and started from the start check, all
// sampled on the rising clock edge. rb_data = {started, result2, result1}
// at word rb_addr, combinational.
module result_dram
  import olt_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned RESULT_ADDR = 0,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          result1,
  input  logic          result2,
  input  logic          started,
  input  logic [AW-1:0] rb_addr,
  output logic [2:0]    rb_data
);
  logic [2:0] flag, we;

  always_comb begin
    flag             = '0;
    flag[RB_RESULT1] = result1;
    flag[RB_RESULT2] = result2;
    flag[RB_STARTED] = started;
  end

  for (genvar i = 0; i < 3; i++) begin : g_lut
    assign we[i] = rst | flag[i];
    lut_ram #(.DEPTH(DEPTH)) u_ram (
      .clk  (clk),
      .we   (we[i]),
      .a    (AW'(RESULT_ADDR)),
      .d    (~rst & flag[i]),
      .rb_a (rb_addr),
      .rb_o (rb_data[i])
    );
  end

  initial assert (RESULT_ADDR < DEPTH) else $error("result_dram: RESULT_ADDR out of range");

endmodule
