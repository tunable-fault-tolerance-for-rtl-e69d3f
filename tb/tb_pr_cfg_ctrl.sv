// tb_pr_cfg_ctrl: checks the configuration controller with a model configuration memory
// (the example application, addressed combinationally) and a scripted error input.
// Checked: the rotation of application stripes over the physical stripes and the
// skipping of a bad stripe; the drain before a test; the placement of the test slots at
// base + slot; the cycle count of a stripe-test cycle, NV*(ND+6)+5 plus the 3-cycle
// tail; the numbers of test configuration writes, LFSR steps and compared vectors; the
// sequence of bases and the completion of a test cycle when every stripe has been a
// stripe under test; the share of test cycles for a given pt; a fault stop and resume;
// resident mode for a 10-stripe application (configured once per test, held between
// tests, test share still close to pt).
module tb_pr_cfg_ctrl;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  localparam int unsigned NP = 16;
  localparam int unsigned NV_MAX = 256;
  localparam int unsigned ND = 56;
  localparam int NV = 18;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, init_test, resume;
  logic [8:0] nv;
  logic [6:0] pt;
  logic [NP-1:0] bad_mask, tested;
  logic [NP-1:0][NPE-1:0] fix_en;
  logic [7:0] mem_addr, fault_vstripe;
  stripe_cfg_t mem_data, cfg_out;
  logic cfg_we, cfg_clear, accept_in, test_mode, lfsr_step, chk_en, err;
  logic [3:0] cfg_sel, fault_base;
  logic running, fault_detected, stripe_test_done, test_cycle_done, test_blocked;
  logic [31:0] app_cycles, test_cycles, vectors_checked;
  int checks = 0, failures = 0;

  pr_cfg_ctrl #(.NP(NP), .NV_MAX(NV_MAX), .ND(ND)) dut (.*);

  always_comb begin
    mem_data = app_stripe(int'(mem_addr), int'(nv));
  end

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

  // ---- monitor -------------------------------------------------------------
  int cyc = 0;
  int exp_ptr = 0, exp_v = 0;
  int last_app_write = -1, test_start = -1, n_test_writes = 0, n_steps = 0, n_chk = 0;
  int n_st_done = 0, n_tc_done = 0, cur_base = -1;
  int bases [$];
  bit in_test = 0, err_script = 0, check_rotation = 1, resident_mode = 0;
  int app_writes_since_test = 0, hold_run = 0, max_hold_run = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && running) begin
      if (stripe_test_done) begin
        n_st_done++;
        if (!fault_detected && in_test) begin
          expect_true(cyc - test_start == int'(nv) * (ND + 6) + 5 + 3, $sformatf("stripe-test cycle length %0d", cyc - test_start));
          expect_true(n_test_writes == 11 + 6 * (int'(nv) - 1), "test configuration writes");
          expect_true(n_steps == int'(nv) * ND && n_chk == int'(nv) * ND, "vectors generated and compared");
        end
        in_test = 0;
        exp_v = 0;
        exp_ptr = (cur_base + 12) % NP;
      end
      if (cfg_we && !cfg_out.is_test) begin
        expect_true(!bad_mask[cfg_sel], "no write to a bad stripe");
        if (check_rotation) begin
          while (bad_mask[exp_ptr]) exp_ptr = (exp_ptr + 1) % NP;
          expect_true(int'(cfg_sel) == exp_ptr && int'(cfg_out.tag) == exp_v, $sformatf("application rotation sel %0d/%0d tag %0d/%0d", cfg_sel, exp_ptr, cfg_out.tag, exp_v));
          expect_true(cfg_out.rd_in == (exp_v == 0) && cfg_out.wr_out == (exp_v == int'(nv) - 1), "first/last flags");
        end
        exp_ptr = (int'(cfg_sel) + 1) % NP;
        exp_v = (int'(cfg_out.tag) + 1) % int'(nv);
        if (int'(cfg_out.tag) == int'(nv) - 1) last_app_write = cyc;
        app_writes_since_test++;
        expect_true(accept_in && !test_mode, "input accepted while running the application");
      end
      if (cfg_we && cfg_out.is_test) begin
        if (!in_test) begin
          in_test = 1; test_start = cyc; n_test_writes = 0; n_steps = 0; n_chk = 0;
          cur_base = (int'(cfg_sel) - int'(cfg_out.tag) + NP) % NP;
          bases.push_back(cur_base);
          expect_true(last_app_write < 0 || resident_mode || cyc - last_app_write == NP + 2, "drain before test");
          if (resident_mode) expect_true(app_writes_since_test == int'(nv), "resident application configured once per test");
          app_writes_since_test = 0;
        end
        n_test_writes++;
        expect_true(int'(cfg_sel) == (cur_base + int'(cfg_out.tag)) % NP, "test slot placement");
        expect_true(test_mode && !accept_in, "test mode during test");
      end
      // resident mode: input accepted for many cycles without any configuration write
      if (accept_in && !cfg_we) hold_run++; else hold_run = 0;
      if (hold_run > max_hold_run) max_hold_run = hold_run;
      if (lfsr_step) n_steps++;
      if (chk_en) n_chk++;
      if (test_cycle_done) n_tc_done++;
    end
  end
  assign err = err_script && chk_en;

  initial begin
    int share;
    rst_n = 0; start = 0; init_test = 0; resume = 0; nv = 9'(NV); pt = 0; bad_mask = '0; err_script = 0; fix_en = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. application only (pt = 0), with one bad stripe
    bad_mask[6] = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (500) @(negedge clk);
    expect_true(n_st_done == 0 && !test_mode, "no test at pt=0");
    // 2. full test cycle with pt = 100, no bad stripe
    bad_mask = '0;
    pt = 100;
    wait (n_tc_done == 1);
    @(negedge clk);
    // the next test cycle starts in the cycle after completion, so its first base may
    // already be recorded
    expect_true(bases.size() == 10 || bases.size() == 11, $sformatf("stripe-test cycles per test cycle: %0d", bases.size()));
    for (int i = 0; i < bases.size() && i < 10; i++)
      expect_true(bases[i] == i, $sformatf("base %0d is %0d", i, bases[i]));
    // 3. tunable share: pt = 30
    pt = 30;
    begin
      int a0, t0;
      a0 = app_cycles; t0 = test_cycles;
      repeat (60000) @(negedge clk);
      share = 100 * (test_cycles - t0) / ((test_cycles - t0) + (app_cycles - a0));
      expect_true(share >= 25 && share <= 35, $sformatf("test share %0d%% at pt=30", share));
      $display("test share at pt=30: %0d%%", share);
    end
    // 4. a mismatch stops the controller, resume restarts
    err_script = 1;
    wait (fault_detected);
    err_script = 0;
    repeat (20) @(negedge clk);
    expect_true(!cfg_we && test_mode && !accept_in, "halted after a fault");
    check_rotation = 0;
    resume = 1; @(negedge clk); resume = 0;
    expect_true(!fault_detected && tested == '0, "resume clears the fault and the tested mask");
    repeat (50) @(negedge clk);
    expect_true(accept_in, "application runs again");
    // 5. resident mode: a 10-stripe application on 16 good stripes, pt = 20
    rst_n = 0; pt = 20; nv = 9'd10; resident_mode = 1; check_rotation = 1;
    exp_ptr = 0; exp_v = 0; last_app_write = -1; app_writes_since_test = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    begin
      int a0, t0, s0;
      a0 = app_cycles; t0 = test_cycles; s0 = n_st_done; max_hold_run = 0;
      start = 1; @(negedge clk); start = 0;
      repeat (40000) @(negedge clk);
      share = 100 * (test_cycles - t0) / ((test_cycles - t0) + (app_cycles - a0));
      $display("resident: test share at pt=20: %0d%%, %0d stripe-test cycles, longest hold %0d cycles", share, n_st_done - s0, max_hold_run);
      expect_true(share >= 15 && share <= 25, $sformatf("resident test share %0d%% at pt=20", share));
      expect_true(n_st_done - s0 >= 5, "tests inserted while resident");
      expect_true(max_hold_run > 100, "resident pipeline takes input without reconfiguration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
