// tb_pr_stripe: checks one stripe against a cycle model kept in the testbench.
// Covered: a configuration takes effect on the edge after it is written (the write
// edge still uses the old one); write-mask updates versus pass-through of untouched
// registers; validity rules (input-reading stripe, tag chain, test stripes, test mode);
// bus driving and its mode gating; compare errors gated by chk_en; bypass of a bad
// stripe (registers, validity and tag copied); cfg_clear.
module tb_pr_stripe;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cfg_we, cfg_clear, bad, prev_valid, gin_ok, test_mode, lfsr_step, chk_en, inj_en;
  stripe_cfg_t cfg_in;
  regfile_t prev_regs, regs;
  logic [TAGW-1:0] prev_tag, tag;
  bus_t gin, gout, bus_drv;
  inj_t inj;
  logic valid, out_valid, gin_take, err;
  int checks = 0, failures = 0;

  pr_stripe dut (.*);

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  stripe_cfg_t m_cfg;
  bit          m_ok;

  function automatic logic [W-1:0] rd(input src_t s, input int x);
    unique case (s.kind)
      SRC_PREV: return prev_regs[s.pe][s.rg];
      SRC_SAME: return regs[s.pe][s.rg];
      SRC_GIN:  return gin[x];
      default:  return gout[x];
    endcase
  endfunction

  // the add, subtract, xor and pass programs of the example application
  function automatic logic [W-1:0] alu(input pe_cfg_t c, input int x);
    logic [W-1:0] a, b;
    a = rd(c.a, x); b = rd(c.b, x);
    if (c.lut_f == LUT_XOR3) return a + b;
    if (c.lut_f == LUT_XOR)  return a ^ b;
    if (c.lut_f == LUT_A)    return a;
    if (c.lut_f == LUT_SUBF) return a - b;
    return '0;
  endfunction

  task automatic randomize_inputs();
    for (int x = 0; x < NPE; x++) begin
      for (int r = 0; r < NREG; r++) prev_regs[x][r] = 8'($urandom);
      gin[x] = 8'($urandom); gout[x] = 8'($urandom);
    end
    prev_valid = 1'($urandom); prev_tag = 8'($urandom_range(6)); gin_ok = 1'($urandom);
  endtask

  initial begin
    regfile_t exp_regs;
    bit live, exp_valid;
    rst_n = 0; cfg_we = 0; cfg_clear = 0; bad = 0; test_mode = 0; lfsr_step = 0; chk_en = 0;
    inj_en = 0; inj = '0; cfg_in = '0; m_ok = 0; m_cfg = '0;
    randomize_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      randomize_inputs();
      cfg_we    = ($urandom_range(3) == 0);
      cfg_clear = ($urandom_range(15) == 0);
      bad       = ($urandom_range(9) == 0);
      test_mode = ($urandom_range(3) == 0);
      chk_en    = 1'($urandom);
      cfg_in = app_stripe($urandom_range(5), 6);
      cfg_in.tag = 8'($urandom_range(6));
      cfg_in.rd_in = (cfg_in.tag == 0);
      cfg_in.wr_out = 1'($urandom);
      cfg_in.is_test = ($urandom_range(2) == 0);
      for (int x = 0; x < NPE; x++) begin
        cfg_in.pe[x].bus_we = 1'($urandom);
        cfg_in.pe[x].chk    = 1'($urandom);
      end
      #1;
      live = m_ok && !cfg_we && !bad;
      exp_valid = 0;
      if (live && !m_cfg.is_test && !test_mode)
        exp_valid = m_cfg.rd_in ? gin_ok : (prev_valid && prev_tag == m_cfg.tag - 1);
      expect_true(out_valid == (exp_valid && m_cfg.wr_out), "out_valid");
      expect_true(gin_take == (live && !m_cfg.is_test && !test_mode && m_cfg.rd_in && gin_ok), "gin_take");
      begin
        bit e;
        e = 0;
        for (int x = 0; x < NPE; x++) begin
          logic [W-1:0] d;
          d = (live && m_cfg.pe[x].bus_we && (m_cfg.is_test == test_mode))
              ? prev_regs[m_cfg.pe[x].a.pe][m_cfg.pe[x].a.rg] : '0;
          expect_true(bus_drv[x] == d, "bus drive");
          if (live && m_cfg.is_test && test_mode && chk_en && m_cfg.pe[x].chk && alu(m_cfg.pe[x], x) != 0) e = 1;
        end
        expect_true(err == e, "err");
      end
      for (int x = 0; x < NPE; x++)
        for (int r = 0; r < NREG; r++)
          exp_regs[x][r] = (!bad && m_cfg.pe[x].wmask[r]) ? alu(m_cfg.pe[x], x) : prev_regs[x][r];
      @(posedge clk);
      #1;
      expect_true(regs == exp_regs, "registers");
      expect_true(valid == (bad ? prev_valid : exp_valid), "valid");
      expect_true(tag == (bad ? prev_tag : m_cfg.tag), "tag");
      if (cfg_we) begin m_cfg = cfg_in; m_ok = 1; end
      else if (cfg_clear) m_ok = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
