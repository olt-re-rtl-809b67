// nut_fabric: the eight nets under test, with emulated routing faults.
//
// On the FPGA the nets under test are routed through the area under test by
// the place-and-route step; each is a chain of physical wires and
// programmable interconnect points (PIPs). This module stands for that
// routing in simulation and lets a testbench inject the fault classes the
// test targets:
//   - stuck-at 0 / stuck-at 1 on a net (a damaged physical wire, or an open
//     net caused by a stuck-off PIP, which reads as a constant);
//   - stuck-on PIP: two nets shorted together. The short resolves as a
//     wired-AND, which is this design's choice.
// A stuck-at 1 wins over a stuck-at 0 on the same net; a short is applied
// before the stuck-at faults. With fault == NO_FAULT, rx equals tx.
//
// Interface: combinational, no clock.
module nut_fabric
  import olt_pkg::*;
(
  input  nut_bus_t   tx,      // TPG side
  input  nut_fault_t fault,   // faults to emulate
  output nut_bus_t   rx       // ORA side
);
  logic [N_NUT-1:0] w, s;
  logic             joined;

  always_comb begin
    w      = tx;
    joined = w[fault.short_a] & w[fault.short_b];
    s      = w;
    if (fault.short_en) begin
      s[fault.short_a] = joined;
      s[fault.short_b] = joined;
    end
    rx = (s & ~fault.sa0) | fault.sa1;
  end

endmodule
