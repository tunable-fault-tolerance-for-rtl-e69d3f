// pr_interstripe: the pass-register lines from one stripe to the next.
//
// Every pass register of the sending stripe has its own line to the same register of the
// receiving stripe (NPE x NREG lines). When one line is broken, the register it carried
// is redirected: the sending side puts that register's value on the line of the spare
// register (NREG-1) of the same PE, and the receiving side takes it from there back into
// its original position. Applications therefore leave the spare register unused.
// The document performs this redirect by configuring the stripes on either side of the
// damaged line; here the same data movement is done by a mux pair per PE controlled by
// a repair entry (fix_en[pe], fix_rg[pe]), which costs no extra stripes. As in the
// document, one broken line per PE can be repaired (up to NPE per link).
// A verification hook (inj) can force one bit of one line to a value, to model a
// stuck-at fault on the wire.
// Timing: combinational.
module pr_interstripe
  import pr_pkg::*;
(
  input  regfile_t  src_regs,     // pass registers of the sending stripe
  input  logic [NPE-1:0]         fix_en,  // per PE: redirect register fix_rg via the spare line
  input  logic [NPE-1:0][RW-1:0] fix_rg,
  input  logic      inj_en,       // stuck-at on line (inj_pe, inj_rg), bit inj_bit
  input  logic [PEW-1:0] inj_pe,
  input  logic [RW-1:0]  inj_rg,
  input  logic [$clog2(W)-1:0] inj_bit,
  input  logic      inj_val,
  output regfile_t  dst_regs      // register values as seen by the receiving stripe
);

  regfile_t lines;

  always_comb begin
    lines = src_regs;
    for (int x = 0; x < NPE; x++)
      if (fix_en[x])
        lines[x][SPARE] = src_regs[x][fix_rg[x]];
    if (inj_en)
      lines[inj_pe][inj_rg][inj_bit] = inj_val;
    dst_regs = lines;
    for (int x = 0; x < NPE; x++)
      if (fix_en[x])
        dst_regs[x][fix_rg[x]] = lines[x][SPARE];
  end

endmodule
