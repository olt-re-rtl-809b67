// start_check: start-checking circuit of the routing test circuit.
//
// Some configuration or routing faults can keep the test from running at
// all, and then the analyzers would never see a mismatch. The start check
// records positively that the circuit came out of its internal reset and
// was clocked: a small counter, cleared by the internal reset, counts clock
// edges and raises started once START_CYCLES edges have passed. It then
// holds started until the next reset. The test analyzer accepts a result
// only if started was recorded.
//
// The default of 4 cycles is one full period of the TPG counters, so when
// started is seen every pattern has reached the analyzers at least once.
// The counter structure and length are this design's choices; the source
// gives only the purpose of the circuit.
//
// Interface: clk is the internal clock, rst the internal reset (synchronous,
// active high); started rises START_CYCLES clocks after rst falls.
module start_check #(
  parameter int unsigned START_CYCLES = 4
) (
  input  logic clk,
  input  logic rst,
  output logic started
);
  localparam int unsigned CW = $clog2(START_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                               cnt <= '0;
    else if (cnt != CW'(START_CYCLES))     cnt <= cnt + 1'b1;
  end

  assign started = (cnt == CW'(START_CYCLES));

  initial assert (START_CYCLES >= 1) else $error("start_check: START_CYCLES must be at least 1");

endmodule
