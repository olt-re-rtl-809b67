// tb_start_check: checks that started rises exactly START_CYCLES clocks
// after the internal reset falls, stays high, and is cleared by reset.
module tb_start_check;
  localparam int unsigned SC = 4;

  logic clk = 1'b0, rst, started;
  int   checks = 0, failures = 0;

  start_check #(.START_CYCLES(SC)) dut (.clk(clk), .rst(rst), .started(started));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int run = 0; run < 3; run++) begin
      rst = 1'b1;
      repeat (2 + run) @(posedge clk);
      #1;
      check(started == 1'b0, "started low in reset");
      rst = 1'b0;
      n = 0;
      while (!started && n < 10*SC) begin @(posedge clk); #1; n++; end
      check(n == SC, $sformatf("started after %0d clocks, expected %0d", n, SC));
      repeat (20) begin @(posedge clk); #1; check(started == 1'b1, "started held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
