// tb_nut_fabric: checks the fault emulation on the nets under test.
// Random words and random faults; the expected ORA-side word is computed
// bit by bit: a shorted pair carries the AND of both nets, then stuck-at 0
// clears and stuck-at 1 sets a bit. With no fault the word must pass through.
module tb_nut_fabric;
  import olt_pkg::*;

  nut_bus_t   tx, rx;
  nut_fault_t f;
  int         checks = 0, failures = 0;

  nut_fabric dut (.tx(tx), .fault(f), .rx(rx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, exp;
    f = NO_FAULT;
    for (int v = 0; v < 256; v++) begin
      tx = nut_bus_t'(8'(v)); #1;
      check(rx == tx, "no fault passes through");
    end
    for (int i = 0; i < 2000; i++) begin
      t = 8'($urandom);
      f.sa0      = 8'($urandom) & 8'($urandom);
      f.sa1      = 8'($urandom) & 8'($urandom) & 8'($urandom);
      f.short_en = 1'($urandom);
      f.short_a  = net_idx_e'(3'($urandom));
      f.short_b  = net_idx_e'(3'($urandom));
      tx = nut_bus_t'(t); #1;
      for (int b = 0; b < 8; b++) begin
        bit v;
        v = t[b];
        if (f.short_en && (b == int'(f.short_a) || b == int'(f.short_b)))
          v = t[f.short_a] && t[f.short_b];
        if (f.sa0[b]) v = 0;
        if (f.sa1[b]) v = 1;
        exp[b] = v;
      end
      check(8'(rx) == exp, $sformatf("tx=%02h rx=%02h exp=%02h", t, rx, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
