// pr_fabric: the reconfigurable fabric, a ring of NP physical stripes.
//
// Stripe i receives the pass registers of stripe i-1 (stripe 0 those of stripe NP-1)
// through interstripe link i. The ring is what lets a virtual pipeline longer than the
// fabric scroll through it: virtual stripe v may be placed in any physical stripe, and
// the next virtual stripe goes in the next physical one.
//
// Global buses: gin is the input bus (NPE words of W bits, one per PE column), offered
// with gin_valid and consumed when gin_take is high. The output bus gout is the OR of
// every stripe's bus drivers; out_valid marks a cycle in which the application's last
// stripe delivers a valid result on it. In test mode the same bus carries the first
// stripe-under-test's results to the compare stripe. err is high in a cycle in which a
// compare PE of the self-test block sees a mismatch; err_mask tells which stripe.
//
// One stripe is configured per cycle (cfg_we, cfg_sel). cfg_clear makes every stripe
// idle. bad_mask bypasses faulty stripes; fix_* holds one repair entry per PE of each link.
// inj/inj_stripe is a verification hook for stuck-at faults (a PE result of stripe
// inj_stripe, or a line of link inj_stripe). NP = 16 as in the chip the document
// evaluates; the bus and hook arrangement is this design's own.
// Timing: configuration takes effect on the edge after cfg_we; data moves one stripe
// per cycle; gout, out_valid and err are combinational from the stripe registers.
module pr_fabric
  import pr_pkg::*;
#(
  parameter int unsigned NP = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [$clog2(NP)-1:0] cfg_sel,
  input  stripe_cfg_t cfg_in,
  input  logic        cfg_clear,
  input  logic [NP-1:0] bad_mask,
  input  logic [NP-1:0][NPE-1:0]         fix_en,  // link i enters stripe i
  input  logic [NP-1:0][NPE-1:0][RW-1:0] fix_rg,
  input  bus_t        gin,
  input  logic        gin_valid,
  input  logic        accept_in,    // the controller allows input to be consumed
  output logic        gin_take,
  output bus_t        gout,
  output logic        out_valid,
  input  logic        test_mode,
  input  logic        lfsr_step,
  input  logic        chk_en,
  output logic        err,
  output logic [NP-1:0] err_mask,
  input  inj_t        inj,
  input  logic [$clog2(NP)-1:0] inj_stripe
);

  regfile_t              regs   [NP];
  regfile_t              linked [NP];
  logic     [NP-1:0]     valid;
  logic     [TAGW-1:0]   tag    [NP];
  bus_t                  drv    [NP];
  logic     [NP-1:0]     ov, take;

  for (genvar i = 0; i < NP; i++) begin : g_stripe
    localparam int unsigned PREV = (i + NP - 1) % NP;

    pr_interstripe u_link (
      .src_regs (regs[PREV]),
      .fix_en   (fix_en[i]),
      .fix_rg   (fix_rg[i]),
      .inj_en   (inj.kind == INJ_LINK && inj_stripe == i[$clog2(NP)-1:0]),
      .inj_pe   (inj.pe),
      .inj_rg   (inj.rg),
      .inj_bit  (inj.bit_idx),
      .inj_val  (inj.value),
      .dst_regs (linked[i])
    );

    pr_stripe u_stripe (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg_we     (cfg_we && cfg_sel == i[$clog2(NP)-1:0]),
      .cfg_in     (cfg_in),
      .cfg_clear  (cfg_clear),
      .bad        (bad_mask[i]),
      .prev_regs  (linked[i]),
      .prev_valid (valid[PREV]),
      .prev_tag   (tag[PREV]),
      .gin        (gin),
      .gin_ok     (gin_valid && accept_in),
      .gout       (gout),
      .test_mode  (test_mode),
      .lfsr_step  (lfsr_step),
      .chk_en     (chk_en),
      .inj_en     (inj_stripe == i[$clog2(NP)-1:0]),
      .inj        (inj),
      .regs       (regs[i]),
      .valid      (valid[i]),
      .tag        (tag[i]),
      .bus_drv    (drv[i]),
      .out_valid  (ov[i]),
      .gin_take   (take[i]),
      .err        (err_mask[i])
    );
  end

  always_comb begin
    gout = '0;
    for (int i = 0; i < NP; i++)
      gout |= drv[i];
  end

  assign out_valid = |ov;
  assign gin_take  = |take;
  assign err       = |err_mask;

endmodule
