// reset_gen: internal reset generator of the test circuit.
//
// An N-bit shift register is pre-loaded with N ones when the circuit is
// configured and shifts a zero in on every clock edge; its last stage is the
// reset. Reset is therefore high for exactly N rising clock edges after
// configuration and then stays low until the next configuration. On the
// FPGA the register is one LUT used as a shift register (SRL16) and the
// pre-load is its configured initial value.
//
// Interface: gsr models the configuration load (the device's global
// set/reset, asynchronous, active high); rst is active high and changes on
// the rising clock edge. N = 16 (one 16-bit LUT shift register) is this
// design's choice; the source leaves n as a parameter.
module reset_gen #(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic gsr,
  output logic rst
);
  logic [N-1:0] sr;

  always_ff @(posedge clk or posedge gsr) begin
    if (gsr) sr <= '1;
    else     sr <= {sr[N-2:0], 1'b0};
  end

  assign rst = sr[N-1];

  initial assert (N >= 2) else $error("reset_gen: N must be at least 2");

endmodule
