// tb_result_dram: checks the result memory.
// Reset clears the result word; a single-cycle analyzer mismatch is kept
// (sticky) until the next reset; the start flag is recorded; other words of
// the LUT RAMs are not touched.
module tb_result_dram;
  import olt_pkg::*;

  logic       clk = 1'b0, rst, r1, r2, st;
  logic [3:0] rb_addr;
  logic [2:0] rb_data;
  int         checks = 0, failures = 0;

  result_dram dut (.clk(clk), .rst(rst), .result1(r1), .result2(r2), .started(st),
                   .rb_addr(rb_addr), .rb_data(rb_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] other [16];
    logic [2:0] exp;
    r1 = 0; r2 = 0; st = 0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    for (int a = 1; a < 16; a++) begin rb_addr = 4'(a); #1; other[a] = rb_data; end
    rb_addr = 0; #1;
    check(rb_data == 3'b000, "cleared during reset");
    for (int run = 0; run < 40; run++) begin
      int    len, pulse_at;
      bit    which;
      rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
      check(rb_data == 3'b000, "cleared by reset");
      len      = 4 + int'($urandom_range(0, 8));
      pulse_at = int'($urandom_range(0, 12));
      which    = 1'($urandom);
      exp      = 3'b000;
      for (int c = 0; c < len + 13; c++) begin
        st = (c >= len);
        r1 = (c == pulse_at) && (run % 3 != 0) && !which;
        r2 = (c == pulse_at) && (run % 3 != 0) &&  which;
        @(posedge clk); #1;
        if (r1) exp[RB_RESULT1] = 1;
        if (r2) exp[RB_RESULT2] = 1;
        if (st) exp[RB_STARTED] = 1;
        check(rb_data == exp, $sformatf("run %0d cycle %0d: %b exp %b", run, c, rb_data, exp));
      end
      r1 = 0; r2 = 0;
    end
    for (int a = 1; a < 16; a++) begin
      rb_addr = 4'(a); #1;
      check(rb_data == other[a], $sformatf("word %0d untouched", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
