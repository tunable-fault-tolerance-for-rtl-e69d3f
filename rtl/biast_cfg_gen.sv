// biast_cfg_gen: builds the configuration of one slot of the twelve-stripe self-test block.
//
// The self-test (built-in applicable self-test) uses the application's own stripe
// configurations as tests. Two stripes under test (SUTs) get the same application
// stripe and identical pseudo-random stimulus; a mismatch between their results means
// a fault. The block has two identical six-stripe halves:
//
//   slot 0 / 6   LFSR stripe: PE 0 and PE 1 are 8-bit LFSRs (same taps, different seeds)
//                writing all their registers; all other registers are cleared to zero,
//                so both halves start from identical state.
//   slot 1 / 7   reroute A: copies the first LFSR value into every register the SUT reads
//                as an A operand.
//   slot 2 / 8   reroute B: copies the second LFSR value into every register the SUT
//                reads as a B operand, and into the spare register of every PE whose
//                SUT result is unused, so that all spare registers reaching the compare
//                are set inside the block.
//   slot 3 / 9   SUT: the application stripe, without input/output duties; every PE
//                that produces a result also writes it into the spare register.
//   slot 4       write: puts the first SUT's spare registers on the global output bus.
//   slot 10      compare: XORs the second SUT's spare registers with the bus and flags
//                any non-zero result.
//   slot 5 / 11  blank (pass-through), kept free for fault isolation.
//
// The reroute stripes depend on the SUT configuration, so slots 1-3 and 7-9 are
// rebuilt for each application stripe; the others are fixed, which gives the six
// reconfiguration cycles per configuration that the document's timing assumes.
// Copying each SUT result into the spare register is this design's own way of making
// the write and compare stripes independent of the SUT. Taps 8'h30 give a
// feedback sequence of period 63 (x^6 + x + 1), the 63 distinct vectors of the document;
// the seeds are consistent states of that sequence.
// Timing: combinational.
module biast_cfg_gen
  import pr_pkg::*;
#(
  parameter logic [W-1:0] TAPS   = 8'h30,
  parameter logic [W-1:0] SEED_A = 8'hC1,
  parameter logic [W-1:0] SEED_B = 8'h9A
) (
  input  logic [3:0]  slot,       // 0..11
  input  stripe_cfg_t app_cfg,    // application stripe being used as the test
  output stripe_cfg_t cfg
);

  localparam int unsigned LFSR_A_PE = 0;
  localparam int unsigned LFSR_B_PE = 1;

  logic [NPE-1:0][NREG-1:0] used_a, used_b;

  function automatic src_t src(input src_kind_e k, input int unsigned pe, input int unsigned rg);
    src      = '0;
    src.kind = k;
    src.pe   = PEW'(pe);
    src.rg   = RW'(rg);
  endfunction

  always_comb begin
    used_a = '0;
    used_b = '0;
    for (int y = 0; y < NPE; y++) begin
      if (app_cfg.pe[y].a.kind == SRC_PREV)
        used_a[app_cfg.pe[y].a.pe][app_cfg.pe[y].a.rg] = 1'b1;
      if (app_cfg.pe[y].b.kind == SRC_PREV)
        used_b[app_cfg.pe[y].b.pe][app_cfg.pe[y].b.rg] = 1'b1;
    end

    cfg         = '0;
    cfg.is_test = 1'b1;
    cfg.tag     = TAGW'(slot);
    unique case (slot)
      4'd0, 4'd6: begin
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].lut_f = LUT_ZERO;
          cfg.pe[x].wmask = '1;
        end
        cfg.pe[LFSR_A_PE].lfsr = 1'b1;
        cfg.pe[LFSR_A_PE].a    = src(SRC_SAME, LFSR_A_PE, SPARE);
        cfg.pe[LFSR_A_PE].taps = TAPS;
        cfg.pe[LFSR_A_PE].imm  = SEED_A;
        cfg.pe[LFSR_B_PE].lfsr = 1'b1;
        cfg.pe[LFSR_B_PE].a    = src(SRC_SAME, LFSR_B_PE, SPARE);
        cfg.pe[LFSR_B_PE].taps = TAPS;
        cfg.pe[LFSR_B_PE].imm  = SEED_B;
      end
      4'd1, 4'd7: begin
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].lut_f = LUT_A;
          cfg.pe[x].a     = src(SRC_PREV, LFSR_A_PE, SPARE);
          cfg.pe[x].wmask = used_a[x];
        end
      end
      4'd2, 4'd8: begin
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].lut_f = LUT_A;
          cfg.pe[x].a     = src(SRC_PREV, LFSR_B_PE, SPARE);
          cfg.pe[x].wmask = used_b[x];
          if (app_cfg.pe[x].wmask == '0)
            cfg.pe[x].wmask[SPARE] = 1'b1;
        end
      end
      4'd3, 4'd9: begin
        cfg.pe  = app_cfg.pe;
        cfg.tag = TAGW'(slot);
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].bus_we = 1'b0;
          cfg.pe[x].chk    = 1'b0;
          if (app_cfg.pe[x].wmask != '0)
            cfg.pe[x].wmask[SPARE] = 1'b1;
        end
      end
      4'd4: begin
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].lut_f  = LUT_A;
          cfg.pe[x].a      = src(SRC_PREV, x, SPARE);
          cfg.pe[x].bus_we = 1'b1;
        end
      end
      4'd10: begin
        for (int x = 0; x < NPE; x++) begin
          cfg.pe[x].lut_f = LUT_XOR;
          cfg.pe[x].a     = src(SRC_PREV, x, SPARE);
          cfg.pe[x].b     = src(SRC_GOUT, x, 0);
          cfg.pe[x].chk   = 1'b1;
        end
      end
      default: ;   // blank: every register passes through
    endcase
  end

endmodule
