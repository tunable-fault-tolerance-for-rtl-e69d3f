// pr_pe: one processing element (PE) of a stripe, combinational.
//
// Operands A and B are picked from the previous stripe's pass registers (any PE, any
// register), from this stripe's own registered outputs, or from this PE's slice of the
// global input or output bus. The ALU is built, as in the PipeRench fabric, from
// look-up tables plus a carry chain: for every bit i two 3-input LUTs (result and carry)
// read {carry_i, b_i, a_i}. With the right LUT programs this gives add, subtract, and
// every two-input bitwise function. A logical barrel shifter follows the ALU. Zero detection on the result drives the error flag of
// a compare PE (chk). In LFSR mode the PE is a shift register with XOR feedback over the
// bits selected by taps; it steps when lfsr_step is high and holds its seed (imm)
// otherwise, so a self-test always starts from a known state.
//
// The stripe writes the result into the pass registers named by wmask. The operand
// crossbar, the shifter's placement after the ALU, LFSR mode and the verification fault hook (inj: a stuck-at bit on the
// result) are this design's choices; the document names LUTs, carry chains, zero
// detection and shifters as the PE contents without detailing them.
// Timing: purely combinational.
module pr_pe
  import pr_pkg::*;
(
  input  pe_cfg_t   cfg,
  input  regfile_t  prev_regs,   // previous stripe, after the interstripe lines
  input  regfile_t  same_regs,   // this stripe's own registers
  input  logic [W-1:0] gin,      // this PE's slice of the global input bus
  input  logic [W-1:0] gout,     // this PE's slice of the global output bus
  input  logic      lfsr_step,
  input  logic      inj_en,      // force result bit inj_bit to inj_val
  input  logic [$clog2(W)-1:0] inj_bit,
  input  logic      inj_val,
  output logic [W-1:0] result,
  output logic      nonzero      // result != 0 (zero detector)
);

  function automatic logic [W-1:0] pick(input src_t s, input regfile_t pr, input regfile_t sr,
                                        input logic [W-1:0] gi, input logic [W-1:0] go);
    unique case (s.kind)
      SRC_PREV: pick = pr[s.pe][s.rg];
      SRC_SAME: pick = sr[s.pe][s.rg];
      SRC_GIN:  pick = gi;
      default:  pick = go;
    endcase
  endfunction

  logic [W-1:0] a, b, alu;
  logic [W:0]   carry;

  assign a        = pick(cfg.a, prev_regs, same_regs, gin, gout);
  assign b        = pick(cfg.b, prev_regs, same_regs, gin, gout);
  assign carry[0] = cfg.cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign alu[i]     = cfg.lut_f[{carry[i], b[i], a[i]}];
    assign carry[i+1] = cfg.lut_c[{carry[i], b[i], a[i]}];
  end

  always_comb begin
    if (cfg.lfsr)
      result = lfsr_step ? {a[W-2:0], ^(a & cfg.taps)} : cfg.imm;
    else if (cfg.sh_left)
      result = alu << cfg.sh_amt;
    else
      result = alu >> cfg.sh_amt;
    if (inj_en)
      result[inj_bit] = inj_val;
    nonzero = |result;
  end

endmodule
