// lut_ram: one LUT used as a DEPTH x 1 distributed RAM.
//
// Synchronous write on the rising clock edge at address a. The contents are
// read asynchronously through a separate read address (rb_a/rb_o), in the
// way a dual-port LUT RAM offers a second read address; here it stands for
// configuration readback. Used by result_dram for the test results.
module lut_ram #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] a,
  input  logic          d,
  input  logic [AW-1:0] rb_a,
  output logic          rb_o
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= d;
  end

  assign rb_o = mem[rb_a];

endmodule
