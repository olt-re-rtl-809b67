# On-line routing test circuit for SRAM-based FPGAs

Radiation slowly damages an FPGA in orbit. Total ionizing dose can leave a
routing wire stuck at 0 or 1. It can also freeze a programmable interconnect
point (PIP) permanently open (stuck-off) or closed (stuck-on). A
reconfigurable system that loads functional modules into free regions at run
time should therefore check a region's routing before using it.

This RTL describes the small, self-contained test circuit that does that
check. It is loaded by partial reconfiguration into the region under test and
runs by itself. It leaves a pass/fail word in LUT RAM, which is read back
through the configuration port. Many copies of the circuit, with the same
logic but routed through different wires and PIPs, are loaded one after the
other until the whole region is covered. Producing those routings is a
design-time software job and is not part of this RTL. The RTL gives the
circuit that every routing shares.

```
 ring_osc    ─clk──────► reset_gen, tpg, start_check, result_dram
 reset_gen   ─rst──────► tpg, start_check, result_dram
 tpg         ═8 nets═══► nut_fabric ═8 nets═► ora ─result1, result2─► result_dram ─rb_data─►
 start_check ─started──► result_dram
```

## Cross-coupled parity: what travels on the eight nets

The pattern generator (`tpg`) has two 2-bit counters, each one slice on a
Virtex-4 (two LUTs, two flip-flops). TPG 1 counts up and TPG 2 counts down.
Both leave reset at the same time, so the down counter is always the bitwise
complement of the up counter.

Each counter drives four nets under test:

* `Cx1`, `Cx2`: its state, LSB and MSB, taken from the flip-flop outputs;
* `Px1`, `Px2`: its next state, taken from the LUT outputs that feed the
  flip-flops.

For a binary counter the next MSB is a parity of the current state. On the up
counter it is `c2 ^ c1`, the even parity. On the down counter it is
`~(c2 ^ c1)`, the odd parity. So `P12` is the up counter's even parity bit and
`P22` is the down counter's odd parity bit, and they cost no extra LUT.
`Px1` (next LSB = `~c1`) adds a second, independent check.

One pattern period is four clocks:

| cycle | C12 C11 | P12 P11 | C22 C21 | P22 P21 |
|------:|:-------:|:-------:|:-------:|:-------:|
| 0     | 0 0     | 0 1     | 1 1     | 1 0     |
| 1     | 0 1     | 1 0     | 1 0     | 0 1     |
| 2     | 1 0     | 1 1     | 0 1     | 0 0     |
| 3     | 1 1     | 0 0     | 0 0     | 1 1     |

Every net carries both a 0 and a 1 within the period. That is enough to
expose a stuck-at fault on any wire of the net and a stuck-off fault on any
of its PIPs.

### The two analyzers

Each analyzer in `ora` is one 4-input LUT. The analyzers are cross-coupled:
each checks one counter's state against the other counter's P nets.

| analyzer | inputs                | passes when                                   |
|----------|-----------------------|-----------------------------------------------|
| ORA 1    | C11, C12, P21, P22    | `P22 == ~(C12 ^ C11)` and `P21 == C11`        |
| ORA 2    | C21, C22, P11, P12    | `P12 == (C22 ^ C21)` and `P11 == C21`         |

The cross-coupling means the analyzer needs no copy of the expected pattern.
It also means a fault inside a counter shows up as a mismatch, like a fault
on a wire, because the other counter still runs correctly. An analyzer
output is 1 in every cycle where its check fails.

### What the test can and cannot see

The end-to-end testbench injects every single fault on the eight nets:

* **All 16 stuck-at faults** (two values on each of 8 nets) are detected.
  The same goes for a stuck-off PIP, which leaves its net at a constant.
* **26 of the 28 possible shorts** (a stuck-on PIP joining two nets) are
  detected. The two it misses are C11–P21 and C21–P11. Each of these pairs
  carries identical values in every cycle, so no observer can see a short
  between them. When the routing software targets a stuck-on PIP, it should
  put nets from different pairs on its two ends.

## Self-contained operation

The circuit has no clock pin, reset pin or I/O buffer. It can be moved to
any region by placement alone.

* **`ring_osc`**: the clock. On silicon it is a ring oscillator made of fabric
  resources. A loop like that has no synthesizable description, so this file
  is a timing model. It toggles every `HALF_PERIOD` time units while enabled
  and parks low while the configuration is loading.
* **`reset_gen`**: an N-bit shift register (default 16: one LUT shift
  register) set to all ones when the bitstream loads. It shifts zeros in,
  so its last stage holds reset for exactly N clocks.
* **`start_check`**: some faults could stop the test from running at all, and
  then a silent analyzer would look like a pass. The start check counts
  `START_CYCLES` clocks after reset (default 4, one pattern period) and only
  then sets its flag. A missing start flag means the test failed.
* **`result_dram`**: three 16×1 LUT RAMs, one each for result1, result2 and
  the start flag. While reset is high, word 0 of each is written with 0.
  After that a flag is written with 1 whenever it is raised and is never
  cleared, so a single failing cycle stays recorded until the next load.
* **`nut_fabric`**: stands for the routed nets. On the FPGA it is wires and
  PIPs with no logic. In simulation it lets a testbench apply stuck-at 0/1
  on any net and a short between any two nets. A short resolves as a
  wired-AND. Tie its `fault` input to `olt_pkg::NO_FAULT` for normal
  operation.

## One test run

Times are counted in internal clocks, from the end of the configuration load
(`gsr` falling):

1. Clocks 1–16: reset is high. Both counters sit at their start values and
   the result words are cleared.
2. Clocks 17–20: the counters run through all four patterns. Any mismatch is
   written to the result RAM on the clock after it appears.
3. Clock 20: the start check fires. Clock 21: the start flag is in RAM.
4. Read back word 0 as `{started, result2, result1}`:
   * `3'b100`: the routing of this test circuit passed;
   * result1 or result2 set: a fault on the nets or in a counter;
   * `started` clear: the circuit did not run (counted as a failure).

The circuit keeps running after clock 21. Waiting longer changes nothing
unless a fault appears later, which is then recorded too.

## Top-level interface (`olt_test_circuit`)

| port      | dir | width           | meaning |
|-----------|-----|-----------------|---------|
| `gsr`     | in  | 1               | configuration load (global set/reset of the partial bitstream). High: oscillator stopped, reset register set to all ones |
| `fault`   | in  | `nut_fault_t`   | emulated faults on the nets under test; `NO_FAULT` in use |
| `rb_addr` | in  | 4               | readback address into the result LUT RAMs |
| `rb_data` | out | 3               | `{started, result2, result1}` at `rb_addr`, combinational |
| `clk_o`   | out | 1               | internal clock, for observation |
| `rst_o`   | out | 1               | internal reset, for observation |

Parameters: `RST_LEN` (16), `START_CYCLES` (4), `OSC_HALF_PERIOD` (5 time
units).

## How far it follows the source design, and where it departs

Taken from the source design:

* the block structure (clock generator, reset generator, start check, TPG,
  eight nets under test, ORA, distributed RAM);
* two 2-bit counters, up with even parity and down with odd parity;
* two one-LUT analyzers, cross-coupled;
* the net names and the analyzer wiring;
* a reset made by a shift register pre-loaded with ones;
* results kept in LUT RAM that is read back by configuration readback.

This design's own choices, where the source gives no detail:

* **What the P nets carry.** The source schematic taps two P nets per counter
  from the connections between the counter's LUTs and its flip-flops. Here
  they are read as the next-state bits. That reading makes the MSB tap exactly
  the parity the text describes. Another reading of the schematic would change
  the analyzer equations and the list of undetectable shorts.
* **Start check.** The source states its purpose only. The counter
  implementation and its length are this design's.
* **Result memory use.** One LUT RAM per flag, sticky writes, clearing
  during reset, word 0. The source also checks the LUT RAM itself by
  writing and reading 0 and 1 through configuration before each test; that
  step is outside the circuit and not modelled.
* **Extra connections.** The source block diagram draws the internal reset
  going only to the TPG. Here it also clears the start check and the result
  words. The result RAM also takes the internal clock.
* **Sizes.** Reset length 16, start check 4 clocks and the oscillator period
  are chosen values. The source leaves the reset length as a parameter `n`
  and gives no frequency.
* **Resource count.** On Virtex-4 the source circuit takes 35 logic LUTs,
  3 LUT RAMs, 1 LUT shift register, 11 flip-flops and 24 slices. This RTL
  has 7 flip-flops, the 16-bit shift register and the three LUT RAMs, plus a
  few gates. The difference is most likely the ring oscillator and the start
  check, whose insides the source does not give.
* **Fault model.** Stuck-off is treated as the net reading a constant. A
  stuck-on short resolves as a wired-AND. Both are simulation conventions.

Not described as RTL: the software that places and routes the many test
circuits, the run-time software that loads them and reads back their
results, and the FPGA's configuration controller.

## Files

| file | contents |
|------|----------|
| `rtl/olt_pkg.sv` | net bundle `nut_bus_t`, fault word `nut_fault_t`, `NO_FAULT`, readback bit positions |
| `rtl/olt_test_circuit.sv` | top level |
| `rtl/ring_osc.sv` | clock generator (timing model) |
| `rtl/reset_gen.sv` | internal reset generator |
| `rtl/tpg.sv` | test pattern generator |
| `rtl/nut_fabric.sv` | nets under test with fault emulation |
| `rtl/ora.sv` | output response analyzer |
| `rtl/start_check.sv` | start-checking circuit |
| `rtl/result_dram.sv`, `rtl/lut_ram.sv` | result memory |
| `tb/tb_<module>.sv` | self-checking testbench for each module; `tb_olt_test_circuit` runs the whole circuit at its default parameters |
| `tb/tb_runtime_suite.sv` | a suite of differently routed test circuits over a small modelled region, with result collection and coarse fault location |

## Simulating

With Verilator 5 (the testbenches use timing control, so `--timing` is
needed):

```
verilator --binary --timing --assert -Irtl rtl/olt_pkg.sv \
    tb/tb_olt_test_circuit.sv --top-module tb_olt_test_circuit -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each testbench ends with a
line `TB_RESULT checks=N failures=M` and has a watchdog that ends it with a
failure if it hangs. The end-to-end testbench runs 81 test-circuit loads in
well under a second. It prints how often each mechanism was exercised: reset
length, not-started state, start flag, clean pass, detection by ORA 1 and by
ORA 2, stuck-at and short detection, and clean reload after a failed run.

`tb_runtime_suite` shows how the circuit is used in a system. It models a
region of 48 routing resources and a suite of 12 test circuits, each routing
its 8 nets through 4 resources per net. It loads the suite once fault-free and
once for each resource made faulty (588 loads). It then locates the fault the
way a test analyzer would: the fault must be in a resource that every failing
circuit uses and no passing circuit uses. Every fault is detected, and the
suspect set averages about 2.5 of the 48 resources. Note one rule when you read
results back: a result word keeps the previous run's value until the internal
reset of the new run has cleared it. Wait for `rst_o` to fall before you trust
`rb_data`.

Lint with `verilator --lint-only -Wall -Irtl rtl/olt_pkg.sv rtl/<file>.sv`.
