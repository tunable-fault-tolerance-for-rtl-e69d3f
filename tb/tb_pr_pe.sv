// tb_pr_pe: self-checking test of one processing element.
// Random operands and operand sources; the LUT programs for add, subtract, and, or,
// xor and pass, some followed by a shift, are checked against SystemVerilog arithmetic. LFSR mode is checked for
// hold-at-seed, the shift/feedback rule and a period of 63 distinct states with taps
// 8'h30. The zero detector and the stuck-at hook are checked too.
module tb_pr_pe;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pe_cfg_t  cfg;
  regfile_t prev_regs, same_regs;
  logic [W-1:0] gin, gout, result;
  logic lfsr_step, inj_en, inj_val, nonzero;
  logic [$clog2(W)-1:0] inj_bit;
  int checks = 0, failures = 0;

  pr_pe dut (.*);

  task automatic check(input logic [W-1:0] exp, input string what);
    #1;
    checks++;
    if (result !== exp || nonzero !== (exp != 0)) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, result, exp);
    end
  endtask

  function automatic logic [W-1:0] val_of(input src_t s);
    unique case (s.kind)
      SRC_PREV: return prev_regs[s.pe][s.rg];
      SRC_SAME: return same_regs[s.pe][s.rg];
      SRC_GIN:  return gin;
      default:  return gout;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, exp, st;
    logic [W-1:0] seen [$];
    lfsr_step = 0; inj_en = 0; inj_val = 0; inj_bit = 0;
    for (int t = 0; t < 600; t++) begin
      for (int x = 0; x < NPE; x++)
        for (int r = 0; r < NREG; r++) begin
          prev_regs[x][r] = 8'($urandom);
          same_regs[x][r] = 8'($urandom);
        end
      gin  = 8'($urandom);
      gout = 8'($urandom);
      cfg  = '0;
      cfg.a = mk_src(src_kind_e'($urandom_range(3)), $urandom_range(NPE-1), $urandom_range(NREG-1));
      cfg.b = mk_src(src_kind_e'($urandom_range(3)), $urandom_range(NPE-1), $urandom_range(NREG-1));
      a = val_of(cfg.a);
      b = val_of(cfg.b);
      unique case (t % 6)
        0: begin cfg.lut_f = LUT_XOR3; cfg.lut_c = LUT_MAJ; exp = a + b; end
        1: begin cfg.lut_f = LUT_SUBF; cfg.lut_c = LUT_SUBC; cfg.cin = 1; exp = a - b; end
        2: begin cfg.lut_f = LUT_AND; exp = a & b; end
        3: begin cfg.lut_f = LUT_OR;  exp = a | b; end
        4: begin cfg.lut_f = LUT_XOR; exp = a ^ b; end
        default: begin cfg.lut_f = LUT_B; exp = b; end
      endcase
      if (t % 5 == 0) begin
        cfg.sh_left = 1'($urandom);
        cfg.sh_amt  = 3'($urandom);
        exp = cfg.sh_left ? (exp << cfg.sh_amt) : (exp >> cfg.sh_amt);
      end
      check(exp, $sformatf("op %0d shift %0d/%0d", t % 6, cfg.sh_left, cfg.sh_amt));
      @(posedge clk);
    end
    // zero operands
    cfg = '0; cfg.lut_f = LUT_XOR; cfg.a = mk_src(SRC_GIN, 0, 0); cfg.b = mk_src(SRC_GIN, 0, 0);
    check(8'h00, "a^a is zero");
    // stuck-at hook
    cfg.lut_f = LUT_ZERO; inj_en = 1; inj_bit = 3; inj_val = 1;
    check(8'h08, "stuck-at-1 bit 3");
    inj_en = 0;
    // LFSR: hold gives the seed, step shifts with feedback of bits 5 and 4
    cfg = '0; cfg.lfsr = 1; cfg.taps = 8'h30; cfg.imm = 8'hC1;
    cfg.a = mk_src(SRC_SAME, 0, 7);
    lfsr_step = 0;
    same_regs[0][7] = 8'h55;
    check(8'hC1, "lfsr hold");
    lfsr_step = 1;
    st = 8'hC1;
    for (int i = 0; i < 63; i++) begin
      same_regs[0][7] = st;
      exp = {st[6:0], st[5] ^ st[4]};
      check(exp, "lfsr step");
      foreach (seen[j]) if (seen[j] == st) begin
        checks++; failures++; $display("FAIL lfsr repeats state %h after %0d", st, i);
      end
      seen.push_back(st);
      st = result;
    end
    checks++;
    if (st != 8'hC1) begin failures++; $display("FAIL lfsr period is not 63"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
