// tb_cfg_pkg: configuration builders and a reference model shared by the testbenches.
//
// The example application is a virtual pipeline of nv stripes working on NPE byte lanes:
//   stripe 0        R0 = R1 = input word of the lane (reads the global input bus)
//   stripe k (1..nv-2), by k mod 3:
//     0: R0 = R0 + R1            (add, LUT carry chain)
//     1: R1 = R0 ^ R1[lane+1]    (crosses PEs through the operand crossbar)
//     2: R0 = R0 - R1            (subtract: inverted B, carry in 1)
//   stripe nv-1     drives R0 of the previous stripe onto the output bus
// app_model computes the same result arithmetically, without LUTs.
package tb_cfg_pkg;
  import pr_pkg::*;

  localparam logic [7:0] LUT_SUBF = 8'h69;  // ~(a ^ b ^ c)
  localparam logic [7:0] LUT_SUBC = 8'hB2;  // majority(a, ~b, c)

  function automatic src_t mk_src(input src_kind_e k, input int pe, input int rg);
    mk_src      = '0;
    mk_src.kind = k;
    mk_src.pe   = PEW'(pe);
    mk_src.rg   = RW'(rg);
  endfunction

  function automatic stripe_cfg_t app_stripe(input int k, input int nv);
    stripe_cfg_t c;
    c = '0;
    for (int x = 0; x < NPE; x++) begin
      if (k == 0) begin
        c.pe[x].lut_f = LUT_A;
        c.pe[x].a     = mk_src(SRC_GIN, x, 0);
        c.pe[x].wmask = 8'h03;
      end else if (k == nv - 1) begin
        c.pe[x].lut_f  = LUT_A;
        c.pe[x].a      = mk_src(SRC_PREV, x, 0);
        c.pe[x].bus_we = 1'b1;
      end else begin
        unique case (k % 3)
          0: begin
            c.pe[x].lut_f = LUT_XOR3;
            c.pe[x].lut_c = LUT_MAJ;
            c.pe[x].a     = mk_src(SRC_PREV, x, 0);
            c.pe[x].b     = mk_src(SRC_PREV, x, 1);
            c.pe[x].wmask = 8'h01;
          end
          1: begin
            c.pe[x].lut_f = LUT_XOR;
            c.pe[x].a     = mk_src(SRC_PREV, x, 0);
            c.pe[x].b     = mk_src(SRC_PREV, (x + 1) % NPE, 1);
            c.pe[x].wmask = 8'h02;
          end
          default: begin
            c.pe[x].lut_f = LUT_SUBF;
            c.pe[x].lut_c = LUT_SUBC;
            c.pe[x].cin   = 1'b1;
            c.pe[x].a     = mk_src(SRC_PREV, x, 0);
            c.pe[x].b     = mk_src(SRC_PREV, x, 1);
            c.pe[x].wmask = 8'h01;
          end
        endcase
      end
    end
    return c;
  endfunction

  function automatic bus_t app_model(input bus_t din, input int nv);
    logic [7:0] r0 [NPE];
    logic [7:0] r1 [NPE];
    logic [7:0] n1 [NPE];
    for (int x = 0; x < NPE; x++) begin
      r0[x] = din[x];
      r1[x] = din[x];
    end
    for (int k = 1; k <= nv - 2; k++) begin
      for (int x = 0; x < NPE; x++) n1[x] = r1[x];
      for (int x = 0; x < NPE; x++) begin
        unique case (k % 3)
          0:       r0[x] = r0[x] + r1[x];
          1:       n1[x] = r0[x] ^ r1[(x + 1) % NPE];
          default: r0[x] = r0[x] - r1[x];
        endcase
      end
      for (int x = 0; x < NPE; x++) r1[x] = n1[x];
    end
    for (int x = 0; x < NPE; x++) app_model[x] = r0[x];
  endfunction

  function automatic bus_t rand_bus();
    bus_t b;
    for (int x = 0; x < NPE; x++) b[x] = 8'($urandom);
    return b;
  endfunction

endpackage
