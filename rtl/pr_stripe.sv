// pr_stripe: one physical stripe (pipeline stage) of the fabric.
//
// A stripe holds a configuration register, a row of NPE PEs and their pass registers.
// A new configuration is written in one cycle (cfg_we). In the cycle it is written the
// stripe still computes with its old configuration; from the next clock edge on it
// computes with the new one. On every clock edge each PE's result goes into the pass
// registers selected by its write mask, and all other pass registers copy the incoming
// interstripe lines, so values not touched by a stripe flow on to the next one.
//
// Data validity follows the virtual pipeline: the application's first stripe (rd_in)
// makes a valid item whenever it consumes a global input word, and every other stripe
// makes a valid item only when the previous stripe holds a valid item of the virtual
// stripe just before its own (tag - 1). Leftover stripes therefore never produce output.
//
// A stripe marked bad is bypassed: it ignores its configuration and copies the incoming
// pass registers, validity and tag unchanged, so data crosses it with one cycle of delay,
// as the document's work-around for a faulty stripe describes.
//
// A PE with bus_we drives its slice of the global output bus with the previous stripe's
// pass register named by its A operand address (a registered value, so the bus never
// depends combinationally on itself).
// Self-test stripes (is_test) only act while test_mode is high: their bus writes drive
// the global output bus and their compare PEs (chk) raise err when chk_en is high and
// the PE result is not zero. Application stripes drive the bus only outside test mode.
// Reset clears the configuration-valid flag, the data-valid flag and the registers.
module pr_stripe
  import pr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  stripe_cfg_t cfg_in,
  input  logic        cfg_clear,    // forget the configuration (stripe becomes idle)
  input  logic        bad,          // bypass this stripe
  input  regfile_t    prev_regs,    // from the interstripe lines
  input  logic        prev_valid,
  input  logic [TAGW-1:0] prev_tag,
  input  bus_t        gin,
  input  logic        gin_ok,       // a global input word is offered and may be taken
  input  bus_t        gout,         // resolved global output bus
  input  logic        test_mode,
  input  logic        lfsr_step,
  input  logic        chk_en,
  input  logic        inj_en,       // stuck-at on a PE result of this stripe
  input  inj_t        inj,
  output regfile_t    regs,
  output logic        valid,
  output logic [TAGW-1:0] tag,
  output bus_t        bus_drv,      // this stripe's contribution to the global output bus
  output logic        out_valid,    // an application output word is on the bus
  output logic        gin_take,     // the offered input word is consumed
  output logic        err
);

  stripe_cfg_t cfg;
  logic        cfg_ok;
  logic        live;
  logic        valid_now;
  logic [NPE-1:0][W-1:0] res;
  logic [NPE-1:0]        nz;

  assign live = cfg_ok && !cfg_we && !bad;

  for (genvar x = 0; x < NPE; x++) begin : g_pe
    pr_pe u_pe (
      .cfg       (cfg.pe[x]),
      .prev_regs (prev_regs),
      .same_regs (regs),
      .gin       (gin[x]),
      .gout      (gout[x]),
      .lfsr_step (lfsr_step),
      .inj_en    (inj_en && inj.kind == INJ_PE && inj.pe == PEW'(x)),
      .inj_bit   (inj.bit_idx),
      .inj_val   (inj.value),
      .result    (res[x]),
      .nonzero   (nz[x])
    );
  end

  always_comb begin
    valid_now = 1'b0;
    if (live && !cfg.is_test && !test_mode)
      valid_now = cfg.rd_in ? gin_ok : (prev_valid && prev_tag == cfg.tag - TAGW'(1));
    gin_take  = live && !cfg.is_test && !test_mode && cfg.rd_in && gin_ok;
    out_valid = valid_now && cfg.wr_out;
    err       = 1'b0;
    for (int x = 0; x < NPE; x++) begin
      bus_drv[x] = (live && cfg.pe[x].bus_we && (cfg.is_test == test_mode))
                   ? prev_regs[cfg.pe[x].a.pe][cfg.pe[x].a.rg] : '0;
      if (live && cfg.is_test && test_mode && chk_en && cfg.pe[x].chk && nz[x])
        err = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_ok <= 1'b0;
      cfg    <= '0;
    end else if (cfg_we) begin
      cfg_ok <= 1'b1;
      cfg    <= cfg_in;
    end else if (cfg_clear) begin
      cfg_ok <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= '0;
      valid <= 1'b0;
      tag   <= '0;
    end else if (bad) begin
      regs  <= prev_regs;
      valid <= prev_valid;
      tag   <= prev_tag;
    end else begin
      for (int x = 0; x < NPE; x++)
        for (int r = 0; r < NREG; r++)
          regs[x][r] <= cfg.pe[x].wmask[r] ? res[x] : prev_regs[x][r];
      valid <= valid_now;
      tag   <= cfg.tag;
    end
  end

endmodule
