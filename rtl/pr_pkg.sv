// pr_pkg: sizes and configuration types shared by the PipeRench-style fabric.
//
// The fabric is a ring of physical stripes. Each stripe is a row of NPE processing
// elements (PEs); each PE owns NREG pass registers of W bits. A stripe is programmed in
// one clock cycle with a stripe_cfg_t word, which holds one pe_cfg_t per PE.
//
// Sizes: W = 8 follows the 8-bit PE inputs of the fault-coverage experiment; NPE = 16
// and NREG = 8 follow the 16 PE/stripe, 8 register/PE chip used to explain interstripe
// faults. The register NREG-1 of every PE is the spare that the interstripe redirect
// uses, so application configurations must not use it.
// The encoding of the configuration word is this design's own.
package pr_pkg;

  localparam int unsigned W     = 8;    // PE datapath width
  localparam int unsigned NPE   = 16;   // PEs per stripe
  localparam int unsigned NREG  = 8;    // pass registers per PE
  localparam int unsigned PEW   = $clog2(NPE);
  localparam int unsigned RW    = $clog2(NREG);
  localparam int unsigned TAGW  = 8;    // virtual stripe index carried with the data
  localparam int unsigned SPARE = NREG - 1;  // register reserved for interconnect repair

  // Where a PE operand comes from.
  typedef enum logic [1:0] {
    SRC_PREV = 2'd0,   // registered output (pass register) of the previous stripe
    SRC_SAME = 2'd1,   // registered output of this stripe (feedback, e.g. an LFSR)
    SRC_GIN  = 2'd2,   // this PE's slice of the global input bus
    SRC_GOUT = 2'd3    // this PE's slice of the global output bus
  } src_kind_e;

  typedef struct packed {
    src_kind_e          kind;
    logic [PEW-1:0]     pe;
    logic [RW-1:0]      rg;
  } src_t;

  // One PE's configuration.
  // The ALU is a pair of 3-input LUTs per bit: lut_f gives the result bit and lut_c the
  // carry into the next bit, both indexed by {carry, b, a}. cin is the carry into bit 0.
  typedef struct packed {
    logic [7:0]         lut_f;
    logic [7:0]         lut_c;
    logic               cin;
    logic               sh_left; // barrel shifter after the ALU: direction
    logic [$clog2(W)-1:0] sh_amt; //   and amount (0 = no shift), logical
    src_t               a;
    src_t               b;
    logic [NREG-1:0]    wmask;   // pass registers that take the PE result
    logic               lfsr;    // result = LFSR step of operand A (taps), or imm when held
    logic [W-1:0]       taps;
    logic [W-1:0]       imm;
    logic               bus_we;  // drive the result onto the global output bus slice
    logic               chk;     // raise the stripe error flag if the result is non-zero
  } pe_cfg_t;

  // One stripe's configuration (a "virtual stripe").
  typedef struct packed {
    logic               is_test; // belongs to the self-test block, not the application
    logic               rd_in;   // first stripe of the application: consumes global input
    logic               wr_out;  // last stripe of the application: its bus writes are outputs
    logic [TAGW-1:0]    tag;     // virtual stripe index (application) or test slot
    pe_cfg_t [NPE-1:0]  pe;
  } stripe_cfg_t;

  typedef logic [NPE-1:0][NREG-1:0][W-1:0] regfile_t;
  typedef logic [NPE-1:0][W-1:0]           bus_t;

  // Fault injection for verification: force one bit of one PE result, or of one
  // interstripe line, to a value.
  typedef enum logic [1:0] {
    INJ_NONE = 2'd0,
    INJ_PE   = 2'd1,   // stuck-at on a PE result bit
    INJ_LINK = 2'd2    // stuck-at on an interstripe line entering the stripe
  } inj_kind_e;

  typedef struct packed {
    inj_kind_e          kind;
    logic [PEW-1:0]     pe;
    logic [RW-1:0]      rg;
    logic [$clog2(W)-1:0] bit_idx;
    logic               value;
  } inj_t;

  // LUT programs of common operations.
  localparam logic [7:0] LUT_XOR3  = 8'h96;  // a ^ b ^ c
  localparam logic [7:0] LUT_MAJ   = 8'hE8;  // majority(a, b, c)
  localparam logic [7:0] LUT_A     = 8'hAA;  // a
  localparam logic [7:0] LUT_B     = 8'hCC;  // b
  localparam logic [7:0] LUT_AND   = 8'h88;  // a & b
  localparam logic [7:0] LUT_OR    = 8'hEE;  // a | b
  localparam logic [7:0] LUT_XOR   = 8'h66;  // a ^ b
  localparam logic [7:0] LUT_ZERO  = 8'h00;

endpackage
