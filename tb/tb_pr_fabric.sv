// tb_pr_fabric: runs the example application on the fabric with a sequencer written in
// the testbench (one virtual stripe per cycle into the next physical stripe of the
// ring, skipping bad stripes). Every output word is compared, in order, with the
// reference model applied to the input words consumed. Phases: a virtual pipeline
// longer than the fabric; the same with a bad (bypassed) stripe; a stuck-at fault on an
// interstripe line that the application uses, first unrepaired (outputs must go wrong)
// and then repaired through the spare register (outputs correct again). The number of
// words per pass of the virtual pipeline is checked against NP-1.
module tb_pr_fabric;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  localparam int unsigned NP = 16;
  localparam int NV = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cfg_we, cfg_clear, gin_valid, accept_in, gin_take, out_valid;
  logic test_mode, lfsr_step, chk_en, err;
  logic [3:0] cfg_sel, inj_stripe;
  stripe_cfg_t cfg_in;
  logic [NP-1:0] bad_mask, err_mask;
  logic [NP-1:0][NPE-1:0] fix_en;
  logic [NP-1:0][NPE-1:0][RW-1:0] fix_rg;
  bus_t gin, gout;
  inj_t inj;
  int checks = 0, failures = 0;

  pr_fabric #(.NP(NP)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bus_t exp_q [$];
  int   n_out, n_bad_out, n_in;

  // one phase: passes of the virtual pipeline, then drain
  task automatic run_phase(input int passes, input bit expect_ok, input string name);
    int ptr, v, done_passes;
    int in_at_pass [$];
    @(negedge clk);
    cfg_clear = 1; @(negedge clk); cfg_clear = 0;
    exp_q.delete(); n_out = 0; n_bad_out = 0; n_in = 0;
    ptr = 0; v = 0; done_passes = 0;
    accept_in = 1;
    while (done_passes < passes) begin
      cfg_we = 0;
      if (!bad_mask[ptr]) begin
        cfg_we  = 1;
        cfg_sel = 4'(ptr);
        cfg_in  = app_stripe(v, NV);
        cfg_in.tag = 8'(v); cfg_in.rd_in = (v == 0); cfg_in.wr_out = (v == NV - 1);
        if (v == NV - 1) begin done_passes++; in_at_pass.push_back(n_in); end
        v = (v + 1) % NV;
      end
      ptr = (ptr + 1) % NP;
      @(negedge clk);
    end
    cfg_we = 0; accept_in = 0;
    repeat (3 * NP) @(negedge clk);
    checks++;
    if (n_out != n_in || n_in == 0) begin
      failures++; $display("FAIL %s: %0d inputs, %0d outputs", name, n_in, n_out);
    end
    checks++;
    if (expect_ok ? (n_bad_out != 0) : (n_bad_out == 0)) begin
      failures++; $display("FAIL %s: %0d wrong outputs", name, n_bad_out);
    end
    // words per pass in steady state
    checks++;
    if (in_at_pass[3] - in_at_pass[2] != NP - 1) begin
      failures++; $display("FAIL %s: %0d words per pass", name, in_at_pass[3] - in_at_pass[2]);
    end
    $display("%s: %0d words, %0d wrong", name, n_out, n_bad_out);
  endtask

  // input side and output checking
  always @(posedge clk) begin
    if (rst_n && gin_take) begin
      exp_q.push_back(app_model(gin, NV));
      n_in++;
    end
    if (rst_n && out_valid) begin
      bus_t e;
      n_out++;
      if (exp_q.size() == 0) n_bad_out++;
      else begin
        e = exp_q.pop_front();
        if (gout !== e) n_bad_out++;
      end
    end
  end
  always @(negedge clk) if (gin_take || !gin_valid) begin gin = rand_bus(); gin_valid = 1; end

  initial begin
    rst_n = 0; cfg_we = 0; cfg_clear = 0; cfg_sel = 0; cfg_in = '0; gin = rand_bus(); gin_valid = 0;
    accept_in = 0; test_mode = 0; lfsr_step = 0; chk_en = 0; bad_mask = '0; fix_en = '0;
    fix_rg = '0; inj = '0; inj_stripe = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_phase(8, 1, "plain");
    bad_mask[5] = 1;
    run_phase(8, 1, "bad stripe 5 bypassed");
    bad_mask = '0;
    inj.kind = INJ_LINK; inj.pe = 3; inj.rg = 0; inj.bit_idx = 2; inj.value = 1; inj_stripe = 7;
    run_phase(8, 0, "broken line, no repair");
    // the broken line plus repairs of healthy lines in other PEs of the same link
    fix_en[7][3] = 1; fix_rg[7][3] = 0;
    fix_en[7][9] = 1; fix_rg[7][9] = 1;
    fix_en[7][12] = 1; fix_rg[7][12] = 0;
    run_phase(8, 1, "broken line, repaired");
    checks++;
    if (err !== 0) begin failures++; $display("FAIL err raised outside test"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
