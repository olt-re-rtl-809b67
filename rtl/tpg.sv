// tpg: test pattern generator of the routing test circuit.
//
// Two independent 2-bit counters, each of two LUTs and two flip-flops (one
// slice). TPG 1 counts up 0,1,2,3,0,... and TPG 2 counts down 3,2,1,0,3,...
// Each counter drives four nets under test: its state bits Cx1 (LSB) and Cx2
// (MSB), and the two next-state signals Px1 and Px2 that feed its flip-flops.
//
// The schematic taps Px1/Px2 from the LUT-to-flip-flop nets; the text says
// the up counter produces an even parity bit and the down counter an odd
// one. Both hold with plain binary counters: the up counter's next MSB is
// c2^c1, the even parity of its current state, and the down counter's next
// MSB is ~(c2^c1), the odd parity. The LSB taps (next LSB = ~c1) give the
// analyzers a second, independent check. Reading the taps this way is this
// design's interpretation of the schematic.
//
// Interface: synchronous active-high reset puts TPG 1 at 0 and TPG 2 at 3,
// so the two counters stay complementary; all nets change on the rising
// edge of clk. A full pattern cycle takes 4 clocks.
module tpg
  import olt_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  output nut_bus_t nut
);
  logic [1:0] up_q, dn_q;      // counter states
  logic [1:0] up_d, dn_d;      // next states (the counter LUT outputs)

  always_comb begin
    up_d[0] = ~up_q[0];
    up_d[1] = up_q[1] ^ up_q[0];          // even parity of up_q
    dn_d[0] = ~dn_q[0];
    dn_d[1] = ~(dn_q[1] ^ dn_q[0]);       // odd parity of dn_q
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      up_q <= 2'd0;
      dn_q <= 2'd3;
    end else begin
      up_q <= up_d;
      dn_q <= dn_d;
    end
  end

  always_comb begin
    nut.t1.c1 = up_q[0];
    nut.t1.c2 = up_q[1];
    nut.t1.p1 = up_d[0];
    nut.t1.p2 = up_d[1];
    nut.t2.c1 = dn_q[0];
    nut.t2.c2 = dn_q[1];
    nut.t2.p1 = dn_d[0];
    nut.t2.p2 = dn_d[1];
  end

endmodule
