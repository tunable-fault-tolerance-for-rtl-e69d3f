// tb_pr_interstripe: checks the pass-register lines between two stripes.
// Random repair entries are set on a random subset of PEs; a repair on a healthy line
// must leave every register intact (only the spare slot then carries the redirected
// value). A stuck-at fault on one line corrupts exactly that register when it is not
// repaired; with a repair entry for that register of that PE the value is carried on
// the spare line and arrives intact, while repairs in other PEs work alongside it.
module tb_pr_interstripe;
  import pr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  regfile_t src_regs, dst_regs;
  logic inj_en, inj_val;
  logic [NPE-1:0] fix_en;
  logic [NPE-1:0][RW-1:0] fix_rg;
  logic [PEW-1:0] inj_pe;
  logic [RW-1:0]  inj_rg;
  logic [$clog2(W)-1:0] inj_bit;
  int checks = 0, failures = 0;

  pr_interstripe dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int t = 0; t < 300; t++) begin
      for (int x = 0; x < NPE; x++)
        for (int r = 0; r < NREG; r++)
          src_regs[x][r] = 8'($urandom);
      inj_pe  = PEW'($urandom); inj_rg = RW'($urandom_range(NREG - 2));
      inj_bit = 3'($urandom);
      inj_val = ~src_regs[inj_pe][inj_rg][inj_bit];   // a stuck value that matters
      fix_en = NPE'($urandom);
      for (int x = 0; x < NPE; x++) fix_rg[x] = RW'($urandom_range(NREG - 2));
      unique case (t % 3)
        0: inj_en = 0;
        1: begin inj_en = 1; fix_en[inj_pe] = 0; end
        default: begin inj_en = 1; fix_en[inj_pe] = 1; fix_rg[inj_pe] = inj_rg; end
      endcase
      #1;
      for (int x = 0; x < NPE; x++)
        for (int r = 0; r < NREG; r++) begin
          exp = src_regs[x][r];
          if (fix_en[x] && r == SPARE) exp = src_regs[x][fix_rg[x]];
          if (inj_en && x == inj_pe && r == inj_rg && !(fix_en[x] && fix_rg[x] == inj_rg))
            exp[inj_bit] = inj_val;
          checks++;
          if (dst_regs[x][r] !== exp) begin
            failures++;
            $display("FAIL t=%0d pe %0d reg %0d got %h exp %h", t, x, r, dst_regs[x][r], exp);
          end
        end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
