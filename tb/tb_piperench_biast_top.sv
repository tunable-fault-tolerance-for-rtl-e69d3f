// tb_piperench_biast_top: end-to-end test of the fabric with tunable self-test, at the
// design's default sizes (16 stripes of 16 PEs, 256-word configuration memory, 56 test
// vectors per configuration).
// The example application (18 virtual stripes, longer than the 16-stripe fabric) is
// loaded into the configuration memory; every output word is checked in order against
// the reference model. The run goes through:
//   1. a complete power-on test cycle before the application starts (init_test);
//   2. the application with 20% of cycles for test, several stripe-test cycles inserted;
//   3. a stuck-at fault in a PE of stripe 9: the self-test detects it and stops, the
//      three-stage isolation procedure is run with a runner model, the stripe is marked
//      bad and bypassed, and the application resumes with correct results;
//   4. a stuck-at fault on an interstripe line: detected, repaired through the spare
//      register, and the application again runs correctly with tests passing.
// Each mechanism is counted and a failure is counted for any that never happened.
module tb_piperench_biast_top;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  localparam int unsigned NP = 16;
  localparam int NV = 18;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cw_we, start, init_test, resume, gin_valid, gin_take, out_valid;
  logic [7:0] cw_addr, fault_vstripe;
  stripe_cfg_t cw_data;
  logic [8:0] nv;
  logic [6:0] pt;
  logic [NP-1:0] bad_mask, fault_stripes, tested;
  logic [NP-1:0][NPE-1:0] fix_en;
  logic [NP-1:0][NPE-1:0][RW-1:0] fix_rg;
  bus_t gin, gout;
  logic running, test_mode, fault_detected, stripe_test_done, test_cycle_done, test_blocked;
  logic [3:0] fault_base;
  logic [31:0] app_cycles, test_cycles, vectors_checked;
  logic iso_start, iso_req, iso_ack, iso_res_valid, iso_res_fail, iso_busy, iso_done;
  logic [3:0] iso_src, iso_alt_src, iso_cmp, iso_alt_cmp, iso_req_src, iso_req_cmp, inj_stripe;
  logic [1:0] iso_req_stage, iso_verdict;
  inj_t inj;
  int checks = 0, failures = 0;

  piperench_biast_top dut (.*);

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- data side -------------------------------------------------------------
  bus_t exp_q [$];
  bit   strict = 1;
  int   n_in = 0, n_out = 0, n_ok = 0, n_wrong_excused = 0;
  int   n_stripe_tests = 0, n_test_cycles = 0, n_in_during_test = 0;
  int   first_input_cycle = -1, first_test_cycle_done = -1, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (gin_take) begin
        exp_q.push_back(app_model(gin, NV));
        n_in++;
        if (first_input_cycle < 0) first_input_cycle = cyc;
        if (test_mode) n_in_during_test++;
      end
      if (out_valid) begin
        bus_t e;
        n_out++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
        if (gout === e) n_ok++;
        else if (!strict) n_wrong_excused++;
        else expect_true(0, "output word matches the reference model");
      end
      if (stripe_test_done) n_stripe_tests++;
      if (test_cycle_done) begin
        n_test_cycles++;
        if (first_test_cycle_done < 0) first_test_cycle_done = cyc;
      end
    end
  end
  always @(negedge clk) if (gin_take || !gin_valid) begin gin = rand_bus(); gin_valid = 1; end

  // ---- isolation runner model: a stage fails when the faulty stripe takes part ----
  int iso_bad_stripe = -1, n_iso = 0;
  always @(negedge clk) begin
    iso_ack = 0; iso_res_valid = 0; iso_res_fail = 0;
    if (iso_req) begin
      iso_ack = 1;
    end else if (iso_busy && !iso_done && !iso_ack) begin
      iso_res_valid = 1;
      iso_res_fail = (int'(iso_req_src) == iso_bad_stripe) || (int'(iso_req_cmp) == iso_bad_stripe);
    end
  end

  task automatic wait_tests(input int n);
    int target;
    target = n_stripe_tests + n;
    while (n_stripe_tests < target) @(negedge clk);
  endtask

  initial begin
    int ok0;
    rst_n = 0; cw_we = 0; cw_addr = 0; cw_data = '0; start = 0; init_test = 0; resume = 0;
    nv = 9'(NV); pt = 20; bad_mask = '0; fix_en = '0; fix_rg = '0;
    gin = rand_bus(); gin_valid = 0; inj = '0; inj_stripe = 0;
    iso_start = 0; iso_src = 0; iso_alt_src = 0; iso_cmp = 0; iso_alt_cmp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      cw_we = 1; cw_addr = 8'(k); cw_data = app_stripe(k, NV);
      @(negedge clk);
    end
    cw_we = 0;

    // 1. power-on test cycle, then the application with pt = 20%
    init_test = 1;
    start = 1; @(negedge clk); start = 0;
    wait (first_test_cycle_done > 0);
    repeat (5) @(negedge clk);
    expect_true(first_input_cycle < 0 || first_input_cycle > first_test_cycle_done,
                "no input before the power-on test cycle completes");
    expect_true(n_stripe_tests == 10 && !fault_detected, "power-on test cycle: 10 stripe-test cycles, no fault");
    expect_true(tested == '0, "tested mask restarts after a complete test cycle");

    // 2. application with inserted tests
    wait_tests(3);
    repeat (200) @(negedge clk);
    expect_true(!fault_detected, "no fault reported on a fault-free fabric");
    expect_true(n_ok > 100, $sformatf("application results before faults: %0d", n_ok));
    expect_true(n_in_during_test == 0, "no input consumed in test mode");
    begin
      int share;
      share = 100 * test_cycles / (test_cycles + app_cycles);
      $display("test share so far: %0d%% (pt=20 plus the power-on test cycle)", share);
    end

    // 3. PE fault in stripe 9
    pt = 100;
    strict = 0;
    inj.kind = INJ_PE; inj.pe = 2; inj.rg = 0; inj.bit_idx = 0; inj.value = 1; inj_stripe = 9;
    wait (fault_detected);
    $display("PE fault detected at cycle %0d, test block base %0d", cyc, fault_base);
    @(negedge clk);
    expect_true(fault_stripes != '0, "the compare stripe that saw the mismatch is reported");
    expect_true((int'(fault_base) + 3) % NP == 9 || (int'(fault_base) + 9) % NP == 9 ||
                ((9 - int'(fault_base) + NP) % NP) < 11, "fault found by a test block covering stripe 9");
    // isolate: stimulus from 9, alternate 8, compare 10, alternate 11
    iso_bad_stripe = 9;
    iso_src = 9; iso_alt_src = 8; iso_cmp = 10; iso_alt_cmp = 11;
    iso_start = 1; @(negedge clk); iso_start = 0;
    wait (iso_done);
    n_iso++;
    expect_true(iso_verdict == 2'd1, "isolation names the stimulating stripe");
    @(negedge clk);
    bad_mask[9] = 1;
    resume = 1; @(negedge clk); resume = 0;
    // the application was drained before the test that found the fault
    expect_true(exp_q.size() == 0, "no word in flight at the fault stop");
    strict = 1;
    pt = 20;
    ok0 = n_ok;
    wait_tests(3);
    repeat (200) @(negedge clk);
    expect_true(!fault_detected, "no fault after bypassing stripe 9");
    expect_true(n_ok - ok0 > 50, "application correct with stripe 9 bypassed");

    // 4. interstripe line fault into stripe 4, PE 3, register 0
    pt = 100;
    strict = 0;
    inj.kind = INJ_LINK; inj.pe = 3; inj.rg = 0; inj.bit_idx = 5; inj.value = 0; inj_stripe = 4;
    wait (fault_detected);
    $display("line fault detected at cycle %0d, test block base %0d", cyc, fault_base);
    @(negedge clk);
    fix_en[4][3] = 1; fix_rg[4][3] = 0;
    resume = 1; @(negedge clk); resume = 0;
    expect_true(exp_q.size() == 0, "no word in flight at the fault stop");
    strict = 1;
    pt = 20;
    ok0 = n_ok;
    wait_tests(3);
    repeat (200) @(negedge clk);
    expect_true(!fault_detected, "no fault after repairing the line");
    expect_true(n_ok - ok0 > 50, "application correct with the repaired line");

    // mechanisms
    expect_true(n_test_cycles >= 1, "complete test cycle");
    expect_true(n_iso >= 1, "fault isolation");
    expect_true(n_wrong_excused > 0, "injected faults corrupted the application before detection");
    $display("outputs %0d correct, %0d corrupted by injected faults; %0d stripe-test cycles, %0d test cycles, %0d vectors compared",
             n_ok, n_wrong_excused, n_stripe_tests, n_test_cycles, vectors_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
