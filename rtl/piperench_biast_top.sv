// piperench_biast_top: PipeRench-style runtime-reconfigurable fabric with tunable
// built-in applicable self-test.
//
// Blocks: the configuration memory (pr_cfg_mem) holds the application's virtual
// stripes; the configuration controller (pr_cfg_ctrl) scrolls them through the ring of
// physical stripes (pr_fabric) one stripe per cycle and, for a tunable share pt of the
// cycles, inserts the twelve-stripe self-test block that checks two physical stripes
// at a time with the application's own configurations. A detected mismatch stops the
// controller; the host then locates the fault with the three-stage procedure
// (fault_isolator, whose test-runner handshake is brought out as ports), marks a bad
// stripe in bad_mask (bypassed from then on) or enters a repair for a broken
// interstripe line (fix_*), and pulses resume.
//
// Interface: host writes configuration words (cw_*), sets nv and pt and pulses start.
// Input words are offered on gin/gin_valid and consumed when gin_take is high;
// results appear on gout when out_valid is high (no back-pressure). inj/inj_stripe
// force a stuck-at fault for verification and are tied to INJ_NONE in use.
// fix_en/fix_rg hold one line repair per PE of each link (link i enters stripe i).
//
// Timing: one stripe is configured per cycle; a stripe-test cycle lasts
// nv*(ND+6)+5 cycles plus a 3-cycle tail; status outputs are registered.
// The fabric, the test block, the timing and the isolation procedure follow the
// document; leaving detection, isolation and repair decisions to the host, and the
// repair muxes in place of reconfigured repair stripes, are this design's choices.
module piperench_biast_top
  import pr_pkg::*;
#(
  parameter int unsigned NP     = 16,
  parameter int unsigned NV_MAX = 256,
  parameter int unsigned ND     = 56
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration memory load
  input  logic        cw_we,
  input  logic [$clog2(NV_MAX)-1:0] cw_addr,
  input  stripe_cfg_t cw_data,
  // control
  input  logic        start,
  input  logic        init_test,
  input  logic        resume,
  input  logic [$clog2(NV_MAX+1)-1:0] nv,
  input  logic [6:0]  pt,
  input  logic [NP-1:0] bad_mask,
  input  logic [NP-1:0][NPE-1:0]         fix_en,
  input  logic [NP-1:0][NPE-1:0][RW-1:0] fix_rg,
  // data
  input  bus_t        gin,
  input  logic        gin_valid,
  output logic        gin_take,
  output bus_t        gout,
  output logic        out_valid,
  // status
  output logic        running,
  output logic        test_mode,
  output logic        fault_detected,
  output logic [$clog2(NP)-1:0] fault_base,
  output logic [$clog2(NV_MAX)-1:0] fault_vstripe,
  output logic [NP-1:0] fault_stripes,
  output logic        stripe_test_done,
  output logic        test_cycle_done,
  output logic        test_blocked,
  output logic [NP-1:0] tested,
  output logic [31:0] app_cycles,
  output logic [31:0] test_cycles,
  output logic [31:0] vectors_checked,
  // fault isolation
  input  logic        iso_start,
  input  logic [$clog2(NP)-1:0] iso_src,
  input  logic [$clog2(NP)-1:0] iso_alt_src,
  input  logic [$clog2(NP)-1:0] iso_cmp,
  input  logic [$clog2(NP)-1:0] iso_alt_cmp,
  output logic        iso_req,
  output logic [$clog2(NP)-1:0] iso_req_src,
  output logic [$clog2(NP)-1:0] iso_req_cmp,
  output logic [1:0]  iso_req_stage,
  input  logic        iso_ack,
  input  logic        iso_res_valid,
  input  logic        iso_res_fail,
  output logic        iso_busy,
  output logic        iso_done,
  output logic [1:0]  iso_verdict,
  // verification fault hook
  input  inj_t        inj,
  input  logic [$clog2(NP)-1:0] inj_stripe
);

  logic [$clog2(NV_MAX)-1:0] mem_addr;
  stripe_cfg_t mem_data, cfg;
  logic        cfg_we, cfg_clear, accept_in, lfsr_step, chk_en, err;
  logic [$clog2(NP)-1:0] cfg_sel;
  logic [NP-1:0] err_mask;

  pr_cfg_mem #(.NV_MAX(NV_MAX)) u_mem (
    .clk   (clk),
    .we    (cw_we),
    .waddr (cw_addr),
    .wdata (cw_data),
    .raddr (mem_addr),
    .rdata (mem_data)
  );

  pr_cfg_ctrl #(.NP(NP), .NV_MAX(NV_MAX), .ND(ND)) u_ctrl (
    .clk              (clk),
    .rst_n            (rst_n),
    .start            (start),
    .init_test        (init_test),
    .resume           (resume),
    .nv               (nv),
    .pt               (pt),
    .bad_mask         (bad_mask),
    .fix_en           (fix_en),
    .mem_addr         (mem_addr),
    .mem_data         (mem_data),
    .cfg_we           (cfg_we),
    .cfg_sel          (cfg_sel),
    .cfg_out          (cfg),
    .cfg_clear        (cfg_clear),
    .accept_in        (accept_in),
    .test_mode        (test_mode),
    .lfsr_step        (lfsr_step),
    .chk_en           (chk_en),
    .err              (err),
    .running          (running),
    .fault_detected   (fault_detected),
    .fault_base       (fault_base),
    .fault_vstripe    (fault_vstripe),
    .stripe_test_done (stripe_test_done),
    .test_cycle_done  (test_cycle_done),
    .test_blocked     (test_blocked),
    .tested           (tested),
    .app_cycles       (app_cycles),
    .test_cycles      (test_cycles),
    .vectors_checked  (vectors_checked)
  );

  pr_fabric #(.NP(NP)) u_fabric (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_sel    (cfg_sel),
    .cfg_in     (cfg),
    .cfg_clear  (cfg_clear),
    .bad_mask   (bad_mask),
    .fix_en     (fix_en),
    .fix_rg     (fix_rg),
    .gin        (gin),
    .gin_valid  (gin_valid),
    .accept_in  (accept_in),
    .gin_take   (gin_take),
    .gout       (gout),
    .out_valid  (out_valid),
    .test_mode  (test_mode),
    .lfsr_step  (lfsr_step),
    .chk_en     (chk_en),
    .err        (err),
    .err_mask   (err_mask),
    .inj        (inj),
    .inj_stripe (inj_stripe)
  );

  // Stripes whose compare PEs flagged a mismatch since the last resume.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      fault_stripes <= '0;
    else if (resume)
      fault_stripes <= '0;
    else if (chk_en)
      fault_stripes <= fault_stripes | err_mask;
  end

  fault_isolator #(.NP(NP)) u_iso (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (iso_start),
    .src       (iso_src),
    .alt_src   (iso_alt_src),
    .cmp       (iso_cmp),
    .alt_cmp   (iso_alt_cmp),
    .req       (iso_req),
    .req_src   (iso_req_src),
    .req_cmp   (iso_req_cmp),
    .req_stage (iso_req_stage),
    .ack       (iso_ack),
    .res_valid (iso_res_valid),
    .res_fail  (iso_res_fail),
    .busy      (iso_busy),
    .done      (iso_done),
    .verdict   (iso_verdict)
  );

endmodule
