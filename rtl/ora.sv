// ora: output response analyzer of the routing test circuit.
//
// Two analyzers, one 4-input LUT each, cross-coupled as in the schematic:
// ORA 1 receives TPG 1's state (C11, C12) and TPG 2's taps (P21, P22); ORA 2
// receives TPG 2's state (C21, C22) and TPG 1's taps (P11, P12). Because the
// down counter is always the complement of the up counter, a fault-free
// circuit satisfies
//   ORA 1:  P22 == ~(C12 ^ C11)   (down counter's odd parity vs. up state)
//           P21 == C11            (down counter's next LSB vs. up LSB)
//   ORA 2:  P12 ==  (C22 ^ C21)   (up counter's even parity vs. down state)
//           P11 == C21            (up counter's next LSB vs. down LSB)
// A result is 1 in any cycle where its check fails. The parity comparison
// follows the source; the LSB comparison and the polarity of the result
// (1 = fault seen) are this design's choices.
//
// Interface: purely combinational; the results are sampled into the result
// memory on the next rising clock edge.
module ora
  import olt_pkg::*;
(
  input  nut_bus_t nut,
  output logic     result1,
  output logic     result2
);
  always_comb begin
    result1 = (nut.t2.p2 != ~(nut.t1.c2 ^ nut.t1.c1)) | (nut.t2.p1 != nut.t1.c1);
    result2 = (nut.t1.p2 !=  (nut.t2.c2 ^ nut.t2.c1)) | (nut.t1.p1 != nut.t2.c1);
  end

endmodule
