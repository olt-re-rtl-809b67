// tb_ring_osc: checks the ring-oscillator clock model.
// With en high the clock must toggle every HALF_PERIOD time units; with en
// low it must stay low. Edge times are measured against $time.
module tb_ring_osc;
  localparam int unsigned HP = 5;

  logic en;
  logic clk;
  int   checks = 0, failures = 0;

  ring_osc #(.HALF_PERIOD(HP)) dut (.en(en), .clk_o(clk));

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
    time t_prev, t_now;
    int  edges;
    en = 1'b0;
    #(20*HP);
    check(clk == 1'b0, "clock low while disabled");
    en = 1'b1;
    @(posedge clk); t_prev = $time;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); t_now = $time;
      check(t_now - t_prev == time'(2*HP), $sformatf("period %0t", t_now - t_prev));
      t_prev = t_now;
    end
    en = 1'b0;
    #(3*HP);
    edges = 0;
    fork
      begin : count_edges
        forever begin @(posedge clk); edges++; end
      end
    join_none
    #(40*HP);
    disable fork;
    check(edges == 0, "no clock edges while disabled");
    check(clk == 1'b0, "clock parked low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
