// ring_osc: behavioural model of the test circuit's internal clock generator.
//
// On the FPGA the clock is a ring oscillator built from the fabric itself, so
// the test circuit needs no external clock and can be moved to any region by
// re-placing it. A ring oscillator is a combinational loop whose frequency is
// set by the placed delays; it has no synthesizable RTL description, so this
// file is a timing model only (kind: behavioural model). It toggles clk_o
// every HALF_PERIOD simulation time units while en is high and holds it low
// while en is low. The enable input and the default half period are this
// design's choices; the source gives neither.
module ring_osc #(
  parameter int unsigned HALF_PERIOD = 5
) (
  input  logic en,      // oscillator runs while high
  output logic clk_o    // free-running clock
);
  logic osc;

  initial begin
    osc = 1'b0;
    forever begin
      #(HALF_PERIOD);
      osc = en ? ~osc : 1'b0;
    end
  end

  assign clk_o = osc;

endmodule
