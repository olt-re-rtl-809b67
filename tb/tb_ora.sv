// tb_ora: exhaustive check of the output response analyzer.
// The four fault-free bus words are generated from counter values alone.
// For each of the 256 possible received words, ORA 1 must pass exactly when
// the bits it sees (C11, C12, P21, P22) match the same bits of one of the
// fault-free words, and ORA 2 likewise for (C21, C22, P11, P12).
module tb_ora;
  import olt_pkg::*;

  nut_bus_t   nut;
  logic       r1, r2;
  int         checks = 0, failures = 0;
  logic [7:0] good [4];

  ora dut (.nut(nut), .result1(r1), .result2(r2));

  localparam logic [7:0] MASK1 = 8'b1100_0011;   // P22 P21 . . . . C12 C11
  localparam logic [7:0] MASK2 = 8'b0011_1100;   // . . C22 C21 P12 P11 . .

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok1, ok2;
    for (int t = 0; t < 4; t++) begin
      logic [1:0] up, dn, upn, dnn;
      up = 2'(t); dn = 2'(3 - t); upn = 2'((t + 1) % 4); dnn = 2'(3 - ((t + 1) % 4));
      good[t] = {dnn[1], dnn[0], dn[1], dn[0], upn[1], upn[0], up[1], up[0]};
    end
    for (int v = 0; v < 256; v++) begin
      nut = nut_bus_t'(8'(v));
      #1;
      ok1 = 0; ok2 = 0;
      for (int t = 0; t < 4; t++) begin
        if ((8'(v) & MASK1) == (good[t] & MASK1)) ok1 = 1;
        if ((8'(v) & MASK2) == (good[t] & MASK2)) ok2 = 1;
      end
      check(r1 == !ok1, $sformatf("word %02h: result1=%b", v, r1));
      check(r2 == !ok2, $sformatf("word %02h: result2=%b", v, r2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
