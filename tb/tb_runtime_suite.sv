// tb_runtime_suite: run-time test execution over a small region.
//
// A region is modelled as R_RES routing resources (physical wires and PIPs).
// A suite of N_TC test circuits, all the same olt_test_circuit, differs only
// in routing: net j of circuit c passes through a fixed set of resources
// chosen here so that every resource is used by at least one circuit. For
// each experiment one resource is made faulty (stuck-at 0 or 1), or none.
// Each circuit of the suite is loaded in turn; a net that passes through the
// faulty resource carries the stuck value. After each run the result word is
// read back, as the on-board test analyzer does, and the report is built:
//   - with no fault, every circuit must pass;
//   - with a fault, at least one circuit must fail, and the coarse diagnosis
//     (resources used by every failing circuit and by no passing circuit)
//     must contain the faulty resource.
// The circuit is used at its default parameters.
module tb_runtime_suite;
  import olt_pkg::*;

  localparam int unsigned R_RES = 48;    // routing resources in the region
  localparam int unsigned N_TC  = 12;    // test circuits in the suite
  localparam int unsigned HOPS  = 4;     // resources per net

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
  int n_clean_suites = 0, n_detected = 0, n_located = 0, n_loads = 0, n_cand = 0;

  // route[c][j][h]: h-th resource of net j in circuit c
  int unsigned route [N_TC][N_NUT][HOPS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit uses(int unsigned c, int unsigned j, int unsigned r);
    for (int h = 0; h < HOPS; h++) if (route[c][j][h] == r) return 1;
    return 0;
  endfunction

  // load circuit c with resource bad (R_RES = none) stuck at v; return pass/fail
  task automatic run_circuit(input int c, input int unsigned bad, input bit v, output bit pass);
    nut_fault_t f;
    int         n;
    f = NO_FAULT;
    for (int j = 0; j < N_NUT; j++)
      if (bad < R_RES && uses(c, j, bad)) begin
        if (v) f.sa1[j] = 1'b1; else f.sa0[j] = 1'b1;
      end
    fault   = f;
    rb_addr = 4'd0;
    gsr     = 1'b1;
    #40;
    gsr     = 1'b0;
    // the result words hold the previous run until the internal reset clears them
    n = 0;
    while (rst && n < 200) begin @(posedge clk); #1; n++; end
    while (!rb_data[RB_STARTED] && n < 200) begin @(posedge clk); #1; n++; end
    repeat (4) @(posedge clk);
    #1;
    n_loads++;
    pass = (rb_data == 3'b100);
  endtask

  initial begin
    bit          pass [N_TC];
    bit          cand [R_RES];
    bit          any_fail;
    int unsigned k;
    gsr = 1'b0; fault = NO_FAULT; rb_addr = '0;
    #10;
    // routing: a stride walk so every resource is covered several times
    k = 0;
    for (int c = 0; c < N_TC; c++)
      for (int j = 0; j < N_NUT; j++)
        for (int h = 0; h < HOPS; h++) begin
          route[c][j][h] = (k * 7 + 3 * c) % R_RES;
          k++;
        end

    for (int bad = -1; bad < int'(R_RES); bad++) begin
      bit v;
      v = 1'($urandom);
      any_fail = 0;
      for (int c = 0; c < N_TC; c++) begin
        run_circuit(c, (bad < 0) ? R_RES : unsigned'(bad), v, pass[c]);
        if (!pass[c]) any_fail = 1;
      end
      if (bad < 0) begin
        check(!any_fail, "fault-free region passes every test circuit");
        if (!any_fail) n_clean_suites++;
        continue;
      end
      check(any_fail, $sformatf("fault on resource %0d detected", bad));
      if (any_fail) n_detected++;
      // coarse diagnosis from the report
      for (int r = 0; r < R_RES; r++) begin
        cand[r] = 1;
        for (int c = 0; c < N_TC; c++) begin
          bit used;
          used = 0;
          for (int j = 0; j < N_NUT; j++) if (uses(c, j, r)) used = 1;
          if (pass[c] && used)   cand[r] = 0;
          if (!pass[c] && !used) cand[r] = 0;
        end
      end
      foreach (cand[r]) if (cand[r]) n_cand++;
      check(cand[bad], $sformatf("resource %0d among the diagnosed candidates", bad));
      if (cand[bad]) n_located++;
    end
    $display("suite: loads=%0d clean_suites=%0d faults_detected=%0d faults_located=%0d of %0d",
             n_loads, n_clean_suites, n_detected, n_located, R_RES);
    $display("       mean diagnosis candidates per fault: %0d.%02d of %0d resources",
             n_cand / int'(R_RES), (100 * n_cand / int'(R_RES)) % 100, R_RES);
    check(n_clean_suites == 1, "fault-free suite run");
    check(n_detected == int'(R_RES), "every injected resource fault detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
