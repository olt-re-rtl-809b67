// olt_test_circuit: self-contained test circuit for permanent faults in the
// routing of an SRAM-based FPGA.
//
// The circuit is loaded by partial reconfiguration onto a free region of the
// FPGA before a functional module is placed there. It has no external clock,
// reset or I/O: a ring oscillator makes the clock, a shift register makes
// the reset, and the result is left in LUT RAM that is read back through the
// configuration port. Between the test pattern generator (two 2-bit
// counters with cross-coupled parity) and the output response analyzer
// (two parity checkers) run eight nets under test; every physical wire and
// PIP they use is exercised with both logic values, so a stuck-at, stuck-off
// or stuck-on fault on them makes an analyzer report a mismatch. Many test
// circuits, identical in logic but routed differently, are run one after
// the other to cover a region.
//
// Block structure, following the test-circuit block diagram:
//   ring_osc -> reset_gen -> tpg -> nut_fabric (8 nets) -> ora -> result_dram
//   ring_osc -> start_check -> result_dram
//
// Interface (simulation view):
//   gsr      configuration load; high while the bitstream is written. It
//            pre-loads the reset shift register and stops the oscillator.
//   fault    faults to emulate on the nets under test (NO_FAULT in use).
//   rb_addr  / rb_data  readback of the result memory; word 0 holds
//            {started, result2, result1}. A test passed when it reads 3'b100.
//   clk_o, rst_o  internal clock and reset, for observation only.
// Timing: after gsr falls, reset lasts RST_LEN clocks; started is recorded
// START_CYCLES clocks later; a test is complete RST_LEN + START_CYCLES + 1
// clocks after gsr falls (21 clocks at the defaults).
//
// The default sizes (16-stage reset, 4-cycle start check, oscillator period) are
// this design's choices; the source fixes only the structure.
module olt_test_circuit
  import olt_pkg::*;
#(
  parameter int unsigned RST_LEN            = 16,
  parameter int unsigned START_CYCLES       = 4,
  parameter int unsigned OSC_HALF_PERIOD    = 5
) (
  input  logic       gsr,
  input  nut_fault_t fault,
  input  logic [3:0] rb_addr,
  output logic [2:0] rb_data,
  output logic       clk_o,
  output logic       rst_o
);
  logic     clk, rst, started, result1, result2;
  nut_bus_t nut_tx, nut_rx;

  ring_osc #(.HALF_PERIOD(OSC_HALF_PERIOD)) u_clk (
    .en    (~gsr),
    .clk_o (clk)
  );

  reset_gen #(.N(RST_LEN)) u_rst (
    .clk (clk),
    .gsr (gsr),
    .rst (rst)
  );

  tpg u_tpg (
    .clk (clk),
    .rst (rst),
    .nut (nut_tx)
  );

  nut_fabric u_nut (
    .tx    (nut_tx),
    .fault (fault),
    .rx    (nut_rx)
  );

  ora u_ora (
    .nut     (nut_rx),
    .result1 (result1),
    .result2 (result2)
  );

  start_check #(.START_CYCLES(START_CYCLES)) u_start (
    .clk     (clk),
    .rst     (rst),
    .started (started)
  );

  result_dram #(.DEPTH(16)) u_mem (
    .clk     (clk),
    .rst     (rst),
    .result1 (result1),
    .result2 (result2),
    .started (started),
    .rb_addr (rb_addr),
    .rb_data (rb_data)
  );

  assign clk_o = clk;
  assign rst_o = rst;

endmodule
