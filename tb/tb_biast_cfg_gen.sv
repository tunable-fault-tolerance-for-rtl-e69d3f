// tb_biast_cfg_gen: checks the twelve self-test slot configurations built from
// application stripes: both halves identical, LFSR slots with taps and distinct seeds,
// reroute write masks equal to the registers the SUT reads as A (B) operands, the SUT
// equal to the application stripe apart from its output duties and the added spare
// write, fixed write/compare stripes, blank slots passing everything through.
module tb_biast_cfg_gen;
  import pr_pkg::*;
  import tb_cfg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  slot;
  stripe_cfg_t app_cfg, cfg;
  stripe_cfg_t got [12];
  int checks = 0, failures = 0;

  biast_cfg_gen dut (.*);

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

  initial begin
    for (int t = 0; t < 40; t++) begin
      int nv = 20;
      int k = t % nv;
      app_cfg = app_stripe(k, nv);
      app_cfg.rd_in = (k == 0); app_cfg.wr_out = (k == nv - 1);
      for (int s = 0; s < 12; s++) begin
        slot = 4'(s); #1; got[s] = cfg;
      end
      for (int s = 0; s < 12; s++) expect_true(got[s].is_test && !got[s].rd_in && !got[s].wr_out, "test flags");
      for (int s = 0; s < 4; s++) expect_true(got[s].pe == got[s + 6].pe, $sformatf("halves equal slot %0d", s));
      // LFSR stripe
      expect_true(got[0].pe[0].lfsr && got[0].pe[1].lfsr && got[0].pe[0].taps == 8'h30 &&
                  got[0].pe[0].imm != got[0].pe[1].imm, "lfsr pair");
      for (int x = 0; x < NPE; x++) begin
        bit ua, ub;
        expect_true(got[0].pe[x].wmask == 8'hFF, "lfsr stripe writes all registers");
        for (int r = 0; r < NREG; r++) begin
          ua = 0; ub = 0;
          for (int y = 0; y < NPE; y++) begin
            if (app_cfg.pe[y].a.kind == SRC_PREV && app_cfg.pe[y].a.pe == x && app_cfg.pe[y].a.rg == r) ua = 1;
            if (app_cfg.pe[y].b.kind == SRC_PREV && app_cfg.pe[y].b.pe == x && app_cfg.pe[y].b.rg == r) ub = 1;
          end
          expect_true(got[1].pe[x].wmask[r] == ua, $sformatf("reroute A pe %0d reg %0d", x, r));
          if (r == SPARE) ub = (app_cfg.pe[x].wmask == 0);
          expect_true(got[2].pe[x].wmask[r] == ub, $sformatf("reroute B pe %0d reg %0d", x, r));
        end
        expect_true(got[1].pe[x].a.pe == 0 && got[1].pe[x].a.rg == SPARE && got[1].pe[x].lut_f == LUT_A, "reroute A source");
        expect_true(got[2].pe[x].a.pe == 1 && got[2].pe[x].a.rg == SPARE && got[2].pe[x].lut_f == LUT_A, "reroute B source");
        // SUT
        expect_true(got[3].pe[x].lut_f == app_cfg.pe[x].lut_f && got[3].pe[x].a == app_cfg.pe[x].a &&
                    got[3].pe[x].b == app_cfg.pe[x].b && !got[3].pe[x].bus_we, "SUT copies application PE");
        expect_true(got[3].pe[x].wmask == (app_cfg.pe[x].wmask | ((app_cfg.pe[x].wmask != 0) ? 8'h80 : 8'h00)),
                    "SUT spare write");
        // write / compare / blank
        expect_true(got[4].pe[x].bus_we && got[4].pe[x].a.rg == SPARE && got[4].pe[x].a.pe == x, "write stripe");
        expect_true(got[10].pe[x].chk && got[10].pe[x].b.kind == SRC_GOUT && got[10].pe[x].lut_f == LUT_XOR, "compare stripe");
        expect_true(got[5].pe[x].wmask == 0 && got[11].pe[x].wmask == 0 && !got[5].pe[x].bus_we, "blank");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
