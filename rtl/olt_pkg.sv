// olt_pkg: types and constants shared by the on-line routing test circuit.
//
// The test circuit drives eight nets under test (N-UTs) from a test pattern
// generator (TPG) to an output response analyzer (ORA). Each of the two TPG
// counters sends its 2-bit state (Cx1 = bit 0, Cx2 = bit 1) and two further
// signals Px1, Px2 taken from the counter's next-state logic. The grouping
// and names of the eight nets follow the detailed test-circuit schematic;
// the bit ordering inside the struct is this design's choice.
//
// nut_fault_t is not part of the circuit on the FPGA: it lets a simulation
// emulate the routing faults the test is meant to find (stuck-at 0/1 on a
// physical wire, stuck-off and stuck-on programmable interconnect points).
package olt_pkg;

  localparam int unsigned N_NUT = 8;   // nets under test per test circuit

  // One TPG counter's four nets: state bits and next-state/parity taps.
  typedef struct packed {
    logic p2;   // Px2: next value of the state MSB, i.e. the counter's parity bit
    logic p1;   // Px1: next value of the state LSB
    logic c2;   // Cx2: state MSB
    logic c1;   // Cx1: state LSB
  } tpg_lane_t;

  // All eight nets: lane 1 is the up counter (TPG 1), lane 2 the down counter (TPG 2).
  typedef struct packed {
    tpg_lane_t t2;
    tpg_lane_t t1;
  } nut_bus_t;

  // Net indices inside a nut_bus_t viewed as logic [7:0].
  typedef enum logic [2:0] {
    NET_C11 = 3'd0, NET_C12 = 3'd1, NET_P11 = 3'd2, NET_P12 = 3'd3,
    NET_C21 = 3'd4, NET_C22 = 3'd5, NET_P21 = 3'd6, NET_P22 = 3'd7
  } net_idx_e;

  // Fault emulation on the nets under test.
  //  sa0/sa1 : per-net stuck-at 0 / stuck-at 1 (a physical wire fault, or an
  //            open net caused by a stuck-off PIP, which reads as a constant).
  //  short_* : a stuck-on PIP joining net short_a and net short_b; the joined
  //            pair resolves as a wired-AND.
  typedef struct packed {
    logic [N_NUT-1:0] sa0;
    logic [N_NUT-1:0] sa1;
    logic             short_en;
    net_idx_e         short_a;
    net_idx_e         short_b;
  } nut_fault_t;

  localparam nut_fault_t NO_FAULT = '{sa0: '0, sa1: '0, short_en: 1'b0,
                                      short_a: NET_C11, short_b: NET_C11};

  // Word positions of the readback data {started, result2, result1}.
  localparam int unsigned RB_RESULT1 = 0;
  localparam int unsigned RB_RESULT2 = 1;
  localparam int unsigned RB_STARTED = 2;

endpackage
