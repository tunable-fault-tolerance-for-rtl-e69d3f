// tb_piperench_biast_mtdf: time to detect a fault against the share of cycles spent on
// test, at the design's default sizes (16 stripes of 16 PEs, 56 vectors per
// configuration).
// For each pair (nv, pt) the top is reset, the example application of nv virtual stripes
// is loaded and started with pt percent of cycles for test. This covers the sweep the
// document evaluates (nv 10 to 160, pt 5 to 50%) and its IDEA-sized example (177
// stripes at 10% and 30%). Nv = 10 runs in resident mode (shorter than the fabric).
// Output words are checked against the reference model. At a random cycle within one
// test-cycle period, T_t * 100 / pt, a stuck-at fault is put into a PE of a random
// stripe. The cycles until fault_detected are measured. Checked:
//   - every output word before the fault is correct;
//   - the fault is found within T_t * 100 / pt + 2 * T_s cycles, where
//       T_s = nv * (ND + 6) + 8   (one stripe-test cycle, with the 3-cycle tail)
//       T_t = 10 * T_s            (10 stripe-test cycles per test cycle on 16 stripes);
//   - the share of test cycles is pt within 5 points plus one stripe-test cycle's worth.
// The measured latency is printed next to the document's mean time to detect a fault,
// (248 * nv + 20) / pt cycles. That formula assumes 8 stripe-test cycles per test cycle
// and no tail.
module tb_piperench_biast_mtdf;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  localparam int unsigned NP = 16;
  localparam int ND = 56;
  localparam int NCFG = 6;
  localparam int CFG_NV [NCFG] = '{10, 10, 40, 160, 177, 177};
  localparam int CFG_PT [NCFG] = '{5, 50, 30, 50, 10, 30};

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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- data side -------------------------------------------------------------
  bus_t exp_q [$];
  bit   strict = 1;
  int   cur_nv = 10, n_ok = 0, n_bad = 0;

  always @(posedge clk) begin
    if (rst_n && running) begin
      if (gin_take) exp_q.push_back(app_model(gin, cur_nv));
      if (out_valid) begin
        bus_t e;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
        if (gout === e) n_ok++;
        else if (strict) n_bad++;
      end
    end
  end
  always @(negedge clk) if (gin_take || !gin_valid) begin gin = rand_bus(); gin_valid = 1; end
  assign iso_ack = 1'b0;
  assign iso_res_valid = 1'b0;
  assign iso_res_fail = 1'b0;

  initial begin
    rst_n = 0; cw_we = 0; cw_addr = 0; cw_data = '0; start = 0; init_test = 0; resume = 0;
    nv = '0; pt = '0; bad_mask = '0; fix_en = '0; fix_rg = '0;
    gin = rand_bus(); gin_valid = 0; inj = '0; inj_stripe = 0;
    iso_start = 0; iso_src = 0; iso_alt_src = 0; iso_cmp = 0; iso_alt_cmp = 0;
    for (int c = 0; c < NCFG; c++) begin
      int t_s, t_t, period, inj_at, lat, bound, share, tol, ok0, paper;
      cur_nv = CFG_NV[c];
      t_s = cur_nv * (ND + 6) + 8;
      t_t = 10 * t_s;
      period = t_t * 100 / CFG_PT[c];
      bound = period + 2 * t_s;
      paper = (248 * cur_nv + 20) * 100 / CFG_PT[c];
      rst_n = 0; inj = '0; strict = 1; n_bad = 0; exp_q.delete();
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int k = 0; k < cur_nv; k++) begin
        cw_we = 1; cw_addr = 8'(k); cw_data = app_stripe(k, cur_nv);
        @(negedge clk);
      end
      cw_we = 0;
      nv = 9'(cur_nv); pt = 7'(CFG_PT[c]);
      ok0 = n_ok;
      start = 1; @(negedge clk); start = 0;
      inj_at = 1000 + int'($urandom % 32'(period));
      repeat (inj_at) @(negedge clk);
      expect_true(n_bad == 0 && n_ok > ok0, $sformatf("nv=%0d pt=%0d: %0d correct outputs before the fault, %0d wrong", cur_nv, CFG_PT[c], n_ok - ok0, n_bad));
      strict = 0;
      inj.kind = INJ_PE; inj.pe = PEW'($urandom % NPE); inj.rg = 0; inj.bit_idx = 0; inj.value = 1;
      inj_stripe = 4'($urandom % NP);
      lat = 0;
      while (!fault_detected && lat <= bound) begin
        @(negedge clk);
        lat++;
      end
      share = 100 * int'(test_cycles) / (int'(test_cycles) + int'(app_cycles));
      tol = 5 + 100 * t_s / (int'(test_cycles) + int'(app_cycles));
      $display("nv=%0d pt=%0d%%: fault in stripe %0d PE %0d detected after %0d cycles (bound %0d, document's mean %0d); test share %0d%%",
               cur_nv, CFG_PT[c], inj_stripe, inj.pe, lat, bound, paper, share);
      expect_true(fault_detected, $sformatf("nv=%0d pt=%0d: fault detected within %0d cycles", cur_nv, CFG_PT[c], bound));
      expect_true(share >= CFG_PT[c] - tol && share <= CFG_PT[c] + tol,
                  $sformatf("nv=%0d pt=%0d: test share %0d%%", cur_nv, CFG_PT[c], share));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
