// tb_tpg: checks the test pattern generator against a cycle count.
// Reference: after reset, cycle t has up state t mod 4 and down state
// 3 - (t mod 4); each P tap equals the corresponding bit of the counter's
// state one cycle later. Also checks that every net carries both 0 and 1
// within one 4-cycle period, which is what lets the test detect stuck-at
// faults on it.
module tb_tpg;
  import olt_pkg::*;

  logic     clk = 1'b0, rst;
  nut_bus_t nut;
  int       checks = 0, failures = 0;

  tpg dut (.clk(clk), .rst(rst), .nut(nut));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] up, dn, up_n, dn_n;
    logic [7:0] seen0, seen1, w;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    seen0 = '0; seen1 = '0;
    for (int t = 0; t < 40; t++) begin
      up   = 2'(t % 4);
      dn   = 2'(3 - (t % 4));
      up_n = 2'((t + 1) % 4);
      dn_n = 2'(3 - ((t + 1) % 4));
      check(nut.t1.c1 == up[0] && nut.t1.c2 == up[1], $sformatf("t=%0d up state", t));
      check(nut.t2.c1 == dn[0] && nut.t2.c2 == dn[1], $sformatf("t=%0d down state", t));
      check(nut.t1.p1 == up_n[0] && nut.t1.p2 == up_n[1], $sformatf("t=%0d up taps", t));
      check(nut.t2.p1 == dn_n[0] && nut.t2.p2 == dn_n[1], $sformatf("t=%0d down taps", t));
      // parity as the text states it: even for the up counter, odd for the down counter
      check(nut.t1.p2 == ^up, $sformatf("t=%0d even parity", t));
      check(nut.t2.p2 == ~^dn, $sformatf("t=%0d odd parity", t));
      w = nut;
      if (t < 4) begin seen0 |= ~w; seen1 |= w; end
      @(posedge clk); #1;
    end
    check(seen0 == 8'hFF && seen1 == 8'hFF, "every net toggles within 4 cycles");
    // reset mid-run returns both counters to their start states
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    check(nut.t1.c1 == 0 && nut.t1.c2 == 0 && nut.t2.c1 == 1 && nut.t2.c2 == 1, "re-reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
