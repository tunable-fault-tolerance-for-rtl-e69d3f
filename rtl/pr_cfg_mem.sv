// pr_cfg_mem: on-chip configuration memory holding the application's virtual stripes.
//
// One word per virtual stripe, NV_MAX words of stripe_cfg_t (NPE PE configurations side
// by side), so that a whole stripe can be loaded into the fabric in a single cycle. The
// host writes words through the write port; the configuration controller reads them
// through an asynchronous read port, both to run the application and to copy its
// stripes into the stripes under test of the self-test.
// NV_MAX = 256 is this design's choice; it holds the 177-stripe IDEA example the
// document evaluates. The memory itself is assumed fault free, as in the document.
// Timing: write on the clock edge, read combinational.
module pr_cfg_mem
  import pr_pkg::*;
#(
  parameter int unsigned NV_MAX = 256
) (
  input  logic        clk,
  input  logic        we,
  input  logic [$clog2(NV_MAX)-1:0] waddr,
  input  stripe_cfg_t wdata,
  input  logic [$clog2(NV_MAX)-1:0] raddr,
  output stripe_cfg_t rdata
);

  stripe_cfg_t mem [NV_MAX];

  always_ff @(posedge clk)
    if (we)
      mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
