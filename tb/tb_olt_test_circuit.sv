// tb_olt_test_circuit: end-to-end test of the routing test circuit at its
// default parameters.
//
// Each run stands for loading one test circuit: the fault-emulation word is
// set, the configuration load (gsr) is pulsed, the circuit clocks itself
// from its ring oscillator, and the result word is read back. Runs:
//   - fault-free circuits (must read {started=1, result2=0, result1=0});
//   - every stuck-at 0 and stuck-at 1 on each of the 8 nets;
//   - every stuck-on short between two different nets;
//   - a few random multiple faults.
// The expected result of each run is worked out here from counter values
// only: ORA 1 (ORA 2) must flag a fault exactly when, in some cycle of the
// 4-cycle pattern, the faulty values on its four nets differ from the four
// nets of every fault-free pattern word.
// It also measures the reset length and the time until the start flag is
// recorded, and counts every mechanism of the circuit that a run exercised.
module tb_olt_test_circuit;
  import olt_pkg::*;

  localparam int unsigned RST_LEN      = 16;   // defaults of the top
  localparam int unsigned START_CYCLES = 4;
  localparam logic [7:0]  MASK1 = 8'b1100_0011;  // nets seen by ORA 1
  localparam logic [7:0]  MASK2 = 8'b0011_1100;  // nets seen by ORA 2

  logic       gsr;
  nut_fault_t fault;
  logic [3:0] rb_addr;
  logic [2:0] rb_data;
  logic       clk, rst;

  olt_test_circuit dut (
    .gsr(gsr), .fault(fault), .rb_addr(rb_addr), .rb_data(rb_data),
    .clk_o(clk), .rst_o(rst)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_reset_ok = 0, n_not_started = 0, n_started = 0, n_pass = 0;
  int n_ora1 = 0, n_ora2 = 0, n_sa_det = 0, n_short_det = 0, n_short_equiv = 0;
  int n_reconf_clear = 0, n_multi = 0;

  logic [7:0] good [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] apply_fault(logic [7:0] w, nut_fault_t f);
    logic [7:0] r;
    r = w;
    if (f.short_en) begin
      r[f.short_a] = w[f.short_a] & w[f.short_b];
      r[f.short_b] = w[f.short_a] & w[f.short_b];
    end
    return (r & ~f.sa0) | f.sa1;
  endfunction

  // expected {started, result2, result1} after a complete run
  function automatic logic [2:0] expected(nut_fault_t f);
    bit bad1 = 0, bad2 = 0;
    for (int t = 0; t < 4; t++) begin
      logic [7:0] rx;
      bit m1 = 0, m2 = 0;
      rx = apply_fault(good[t], f);
      for (int g = 0; g < 4; g++) begin
        if ((rx & MASK1) == (good[g] & MASK1)) m1 = 1;
        if ((rx & MASK2) == (good[g] & MASK2)) m2 = 1;
      end
      if (!m1) bad1 = 1;
      if (!m2) bad2 = 1;
    end
    return {1'b1, bad2, bad1};
  endfunction

  // load one test circuit, run it, read back; returns the result word
  task automatic run_test(input nut_fault_t f, output logic [2:0] res);
    int edges;
    fault   = f;
    rb_addr = 4'd0;
    gsr     = 1'b1;
    #40;
    gsr     = 1'b0;
    edges   = 0;
    while (rst) begin
      @(posedge clk); #1;
      edges++;
      if (rb_data[RB_STARTED]) break;
    end
    check(edges == int'(RST_LEN), $sformatf("reset lasted %0d clocks", edges));
    if (edges == int'(RST_LEN)) n_reset_ok++;
    check(rb_data[RB_STARTED] == 1'b0, "start flag clear before the test runs");
    if (!rb_data[RB_STARTED]) n_not_started++;
    edges = 0;
    while (!rb_data[RB_STARTED] && edges < 100) begin @(posedge clk); #1; edges++; end
    check(edges == int'(START_CYCLES) + 1,
          $sformatf("start flag recorded %0d clocks after reset", edges));
    if (rb_data[RB_STARTED]) n_started++;
    repeat (8) @(posedge clk);
    #1;
    res = rb_data;
  endtask

  initial begin
    logic [2:0] res, exp;
    bit         last_failed;
    nut_fault_t f;

    for (int t = 0; t < 4; t++) begin
      logic [1:0] up, dn, upn, dnn;
      up = 2'(t); dn = 2'(3 - t); upn = 2'((t + 1) % 4); dnn = 2'(3 - ((t + 1) % 4));
      good[t] = {dnn[1], dnn[0], dn[1], dn[0], upn[1], upn[0], up[1], up[0]};
    end
    gsr = 1'b0; fault = NO_FAULT; rb_addr = '0;
    #10;
    last_failed = 0;

    // fault-free circuit
    run_test(NO_FAULT, res);
    check(res == 3'b100, $sformatf("fault-free run read %b", res));
    if (res == 3'b100) n_pass++;

    // stuck-at faults, each followed by a fault-free reload
    for (int net = 0; net < 8; net++) begin
      for (int v = 0; v < 2; v++) begin
        f = NO_FAULT;
        if (v == 0) f.sa0[net] = 1'b1; else f.sa1[net] = 1'b1;
        run_test(f, res);
        exp = expected(f);
        check(res == exp, $sformatf("net %0d stuck-at %0d: read %b expected %b", net, v, res, exp));
        check(exp[1:0] != 2'b00, $sformatf("net %0d stuck-at %0d must be detectable", net, v));
        if (res[1:0] != 2'b00) n_sa_det++;
        if (res[RB_RESULT1]) n_ora1++;
        if (res[RB_RESULT2]) n_ora2++;
        run_test(NO_FAULT, res);
        check(res == 3'b100, "reload after a failing circuit reads clean");
        if (res == 3'b100) n_reconf_clear++;
      end
    end

    // stuck-on PIP: shorts between every pair of nets
    for (int a = 0; a < 8; a++) begin
      for (int b = a + 1; b < 8; b++) begin
        f = NO_FAULT;
        f.short_en = 1'b1;
        f.short_a  = net_idx_e'(a);
        f.short_b  = net_idx_e'(b);
        run_test(f, res);
        exp = expected(f);
        check(res == exp, $sformatf("short %0d-%0d: read %b expected %b", a, b, res, exp));
        if (res[1:0] != 2'b00) n_short_det++;
        else                   n_short_equiv++;
        if (res[RB_RESULT1]) n_ora1++;
        if (res[RB_RESULT2]) n_ora2++;
      end
    end

    // random multiple faults
    for (int i = 0; i < 20; i++) begin
      f = NO_FAULT;
      f.sa0      = 8'($urandom) & 8'($urandom) & 8'($urandom);
      f.sa1      = 8'($urandom) & 8'($urandom) & 8'($urandom) & ~f.sa0;
      f.short_en = 1'($urandom);
      f.short_a  = net_idx_e'(3'($urandom));
      f.short_b  = net_idx_e'(3'($urandom));
      run_test(f, res);
      exp = expected(f);
      check(res == exp, $sformatf("multiple fault %0d: read %b expected %b", i, res, exp));
      n_multi++;
    end

    $display("mechanisms: reset_ok=%0d not_started=%0d started=%0d pass=%0d ora1=%0d ora2=%0d",
             n_reset_ok, n_not_started, n_started, n_pass, n_ora1, n_ora2);
    $display("            stuck_at_detected=%0d short_detected=%0d short_equivalent=%0d reload_clean=%0d multi=%0d",
             n_sa_det, n_short_det, n_short_equiv, n_reconf_clear, n_multi);
    check(n_reset_ok > 0,     "internal reset generation exercised");
    check(n_not_started > 0,  "not-started state observed");
    check(n_started > 0,      "start check exercised");
    check(n_pass > 0,         "fault-free pass exercised");
    check(n_ora1 > 0,         "ORA 1 detection exercised");
    check(n_ora2 > 0,         "ORA 2 detection exercised");
    check(n_sa_det == 16,     "all 16 stuck-at faults detected");
    check(n_short_det > 0,    "stuck-on short detection exercised");
    check(n_reconf_clear > 0, "reconfiguration clears the result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
