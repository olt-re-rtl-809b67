// tb_reset_gen: checks the internal reset generator.
// After each configuration load (gsr pulse) the reset must be high for
// exactly N rising clock edges and then stay low.
module tb_reset_gen;
  localparam int unsigned N = 16;

  logic clk = 1'b0, gsr, rst;
  int   checks = 0, failures = 0;

  reset_gen #(.N(N)) dut (.clk(clk), .gsr(gsr), .rst(rst));

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
    int high;
    gsr = 1'b0;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); gsr = 1'b1;
      #2;
      check(rst == 1'b1, "reset high during configuration");
      @(negedge clk); gsr = 1'b0;
      high = 0;
      // count rising edges until reset falls
      while (rst) begin
        @(posedge clk); #1;
        high++;
        if (high > 4*N) break;
      end
      check(high == N, $sformatf("run %0d: reset lasted %0d edges, expected %0d", run, high, N));
      repeat (3*N + run) begin
        @(posedge clk); #1;
        check(rst == 1'b0, "reset stays low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
