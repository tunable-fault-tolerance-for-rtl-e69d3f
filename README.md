# Tunable built-in self-test for a pipeline-reconfigurable fabric

This is SystemVerilog for a PipeRench-style reconfigurable fabric that checks itself while
it runs. The self-test needs no dedicated test hardware. Its stimulus generators, comparators
and test configurations all live in the fabric's own stripes. The share of clock cycles spent
testing is a run-time setting, so a user can trade throughput against how quickly a fault is
noticed.

The main idea: PipeRench scrolls a long virtual pipeline through a short physical one, loading
one stripe configuration per cycle. After the last virtual stripe of an application there is
a natural gap, because no data flows from the last stage back to the first. A block of twelve
*test stripes* can be slotted into that gap. Two of the twelve are *stripes under test* (SUTs).
Both get the same application stripe configuration and the same pseudo-random inputs, and
their results are compared. Because the tests are the application's own configurations, only
faults that would actually disturb this application are looked for: an *applicable* self-test.

## Fabric model

| item | value | notes |
|---|---|---|
| physical stripes `NP` | 16 | ring, `pr_fabric` |
| PEs per stripe `NPE` | 16 | `pr_pkg` |
| pass registers per PE `NREG` | 8 | the last one (R7) is the spare, never used by applications |
| PE width `W` | 8 | |
| configuration memory `NV_MAX` | 256 stripes | holds a 177-stripe application |
| test vectors per configuration `ND` | 56 | from an 8-bit LFSR with a period of 63 |

**Stripes and PEs.** A stripe (`pr_stripe`) is a row of PEs (`pr_pe`) plus their pass
registers and a configuration register.

- **Operands.** Each PE takes operands A and B from any pass register of the previous stripe,
  from any register of its own stripe, or from its lane of the global input or output bus.
- **ALU.** The ALU is two 3-input LUTs per bit, one for the result and one for the carry, both
  indexed by `{carry, b, a}`. These program add, subtract and every bitwise function.
  `tb/tb_cfg_pkg.sv` lists the LUT codes.
- **After the ALU.** A logical barrel shifter follows, then a zero detector.
- **Register write.** On each clock edge the result goes into the registers named by the
  PE's write mask. Every other register copies the incoming interstripe line, so values that
  a stripe does not touch flow on.
- **LFSR mode.** A PE can act as an LFSR: a left shift with XOR feedback over `taps`. It
  steps while `lfsr_step` is high and otherwise outputs its seed `imm`.

**Reconfiguration timing.** A stripe is rewritten in one cycle. On the write edge it still
computes with its old configuration, and the new one applies from the next edge. So exactly
one stripe per cycle is out of use, and an application of `NV` stripes yields `NP-1` words
every `NV` cycles.

**Tags.** Each data word carries the virtual-stripe index (tag) of the stripe that made it.
A stripe accepts a word as valid only if it comes from the virtual stripe just before its
own. Leftover stripes from an earlier pass or from a test therefore never produce output.

**Buses.** `gin` is an NPE-lane input word, consumed when `gin_take` is high. `gout` is the
OR of all bus drivers, and `out_valid` marks an application result on it. There is no
back-pressure: the consumer must take each result in the cycle it appears. A PE with
`bus_we` drives the previous-stripe register named by its A address, so the bus never feeds
back combinationally through a PE. The application's last stripe is therefore an "output
stripe" that publishes registers computed by the stripe before it.

## The test block

`biast_cfg_gen` builds the configuration of each of the twelve slots from the application
stripe under test. The block is two identical halves:

| slot | role |
|---|---|
| 0 / 6 | LFSR stripe. PE0 and PE1 are LFSRs with taps `8'h30` and seeds `C1` / `9A`, writing all their registers. Every other register is cleared. |
| 1 / 7 | reroute A: copies the first LFSR value into every register the SUT reads as an A operand |
| 2 / 8 | reroute B: the same for B operands. Also sets R7 of every PE whose SUT result is unused. |
| 3 / 9 | SUT: the application stripe with its I/O duties removed. Every PE that produces a result also writes it into R7. |
| 4 | write: puts SUT 1's R7 registers on the output bus |
| 10 | compare: XORs SUT 2's R7 registers with the bus and raises `err` on any non-zero lane |
| 5 / 11 | blank pass-through, kept free for fault isolation |

The taps give the recurrence `x^6 + x + 1`, whose period is 63. The seeds are consistent
states of it, so an 8-bit register steps through 63 distinct values.

Both halves must stay in lock-step: the data of SUT 1 and SUT 2 has to reach the compare
stripe in the same cycle. These rules keep it that way:

- The LFSRs hold their seed until the run starts.
- Everything else upstream of the SUTs is rewritten inside the block.
- Copying each SUT result into R7 lets the write and compare stripes stay the same for every
  application stripe.

Because of the last rule, moving to the next application stripe rewrites only the six
reroute and SUT slots.

## Controller (`pr_cfg_ctrl`)

**Normal operation.** The controller copies virtual stripe `v` into physical stripe `ptr`
every cycle and wraps `v` after `nv-1`. A stripe marked in `bad_mask` is skipped. Its slot in
the rotation is spent idle, and the stripe forwards data unchanged with one cycle of delay.
Each bad stripe therefore costs about `1/NP` of the throughput.

**Stripe-test cycle.** At the end of a pass, if a test is due, the controller:

1. Stops taking input and lets the application drain for `NP` cycles.
2. Clears the fabric.
3. Places the test block at a base stripe and writes slots 0 to 10 (11 cycles).
4. Runs `ND` LFSR steps.
5. For each further application stripe `k`, rewrites the six reroute and SUT slots and runs
   `ND` more steps.
6. Waits 3 more cycles so the last vectors reach the compare stripe.

`chk_en` is the LFSR step signal delayed by 3 cycles, the depth from the LFSR to the compare
stripe. One stripe-test cycle therefore lasts

    NV*(ND+6) + 5 + 3 cycles

This is the published `NV*(ND+6)+5` plus the 3-cycle pipeline tail. After the test the fabric
is cleared and the application restarts from virtual stripe 0.

**Tuning.** `pt` (0 to 100) is the percentage of cycles given to testing. A credit counter
gains `pt` for every application cycle and loses `100-pt` for every test cycle. A test is
inserted at a pass boundary whenever the credit is positive. The expected time to detect a
fault therefore scales as `1/pt`. The testbench measures a 30 % share at `pt = 30`.

**Moving the block.** The SUTs sit at `base+3` and `base+9`. The controller keeps a mask of
stripes that have already been SUTs in the current test cycle. For the next base it searches
onward from the last one and takes the first base that:

- has a window of 11 stripes containing no bad stripe,
- has no repaired link where the test block needs R7 (see below), and
- offers an untested SUT.

When no base qualifies, the test cycle is complete (`test_cycle_done`) and the mask is
cleared. If no window qualifies at all, testing stops and `test_blocked` is raised.

With 16 stripes the SUTs are six apart, so no set of 8 positions covers every stripe.
A full test cycle takes 10 stripe-test cycles, not `NP/2 = 8`.

**Short applications.** If `nv` is smaller than the number of good stripes, the controller
writes the `nv` stripes once and then holds (no configuration writes). The pipeline takes
one word per cycle until the credit calls for a test. After the test the application is
written again.

**Power-on test.** With `init_test` set, `start` runs one complete test cycle before any
input is accepted. Those cycles are not charged to the credit.

**On a mismatch.** The controller stops in test mode and reports:

- `fault_detected`,
- the block base and the application stripe that revealed the fault,
- `fault_stripes`, the compare stripes that saw the mismatch.

The host then locates the fault and updates `bad_mask` or the link repairs, and pulses
`resume`. Resuming clears the tested mask, so a whole new test cycle follows, and the
application restarts.

## Tolerating faults

- **Faulty stripe.** Setting its bit in `bad_mask` bypasses it. Its pass registers are
  forwarded unchanged and the controller never configures it.
- **Broken interstripe line.** Each link (`pr_interstripe`) has one repair entry per PE
  (`fix_en[link][pe]`, `fix_rg[link][pe]`). The sender puts register `fix_rg` of that PE
  on the PE's R7 line, and the receiver moves it back into position. One broken line per
  PE per link can be repaired.

The original scheme does the line repair by reconfiguring the stripes on either side, at a
cost of `3/NP` in throughput. Here a mux pair does the same data movement with no cycle
cost. The price is that R7 of that PE cannot cross the repaired link. That is why the
controller avoids test windows where such a link would carry the R7 test data.

## Fault isolation (`fault_isolator`)

Isolation is a three-stage decision for one resource tested by a source stripe and a compare
stripe:

1. Original source and original compare stripe. A pass means the resource is good.
2. Alternate source with the original compare stripe. A pass means the source was faulty.
3. Original source with the alternate compare stripe. A pass means the compare stripe was
   faulty; a fail means the resource itself is faulty.

Each stage is one request on a runner handshake: `req`/`ack`, then `res_valid` with
`res_fail`. Only this decision procedure is in RTL. The stripe configurations that stimulate
and verify each kind of resource are not specified, so the runner is outside the design.
Its handshake is brought out on the top-level `iso_*` ports. The procedure assumes that a
compare stripe and its alternate are never both faulty.

## Departures and limits

- **Test-cycle length.** Each stripe-test cycle is 3 cycles longer than the published
  formula, and a test cycle needs 10 stripe-test cycles instead of `NP/2`. For a 177-stripe
  application on 16 stripes with 56 vectors, a full test cycle is 10 × 10,982 = 109,820
  cycles. The published figure is 87,832.
- **Short applications.** An application with fewer virtual stripes than there are good
  physical stripes is loaded once and then held in place. If it scrolled like a long one,
  two copies of its first stripe would be in the fabric and both would take input. A test
  reloads it afterwards. The original text covers this case only through its throughput
  formula; holding the pipeline is this design's own choice.
- **Not built:**
  - saving and restoring stripe state between passes (the state-store buses), so
    applications must be stateless across passes;
  - input and output FIFOs;
  - unregistered operand chaining between PEs of the same stripe;
  - repair of more than one broken line in the same PE of one link.
- **Generator edge case.** If a SUT reads one register as both its A and B operand, the
  B stimulus wins. The two SUTs still see identical inputs.
- **Verification hook.** `inj`/`inj_stripe` forces one stuck-at bit on a PE result or on
  an interstripe line. In use, tie `inj.kind` to `INJ_NONE`.

## Files and simulation

| file | content |
|---|---|
| `rtl/pr_pkg.sv` | sizes, configuration structs, LUT codes |
| `rtl/pr_pe.sv`, `rtl/pr_stripe.sv`, `rtl/pr_interstripe.sv`, `rtl/pr_fabric.sv` | fabric |
| `rtl/pr_cfg_mem.sv` | configuration memory |
| `rtl/biast_cfg_gen.sv`, `rtl/pr_cfg_ctrl.sv` | test block generator and controller |
| `rtl/fault_isolator.sv` | isolation procedure |
| `rtl/piperench_biast_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module. `tb_cfg_pkg.sv` holds the example application and its reference model. |

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_piperench_biast_top \
      -y rtl -y tb +libext+.sv rtl/pr_pkg.sv tb/tb_cfg_pkg.sv tb/tb_piperench_biast_top.sv
    ./obj_dir/Vtb_piperench_biast_top

The end-to-end testbench runs the top at its default sizes. It loads an 18-stripe example
application (longer than the fabric) and runs, checking every output word against a
reference model:

- a power-on test cycle;
- the application with 20 % of cycles for test;
- an injected PE fault: detected, isolated, then bypassed;
- an injected interstripe-line fault: detected, then repaired.

The run takes a few seconds.

`tb_piperench_biast_mtdf` measures the time to detect a fault, also at default sizes.
For a set of application lengths and test shares it does the following:

- loads and runs the example application;
- injects a stuck-at fault into a random PE at a random time;
- counts the cycles until the fault is reported.

The pairs (stripes, test share) are:

- (10, 5 %), (10, 50 %), (40, 30 %) and (160, 50 %);
- a 177-stripe application at 10 % and 30 %.

It checks that the fault is found within one test-cycle period, `T_t * 100 / pt` cycles,
and that the measured test share matches `pt`. It also prints the measured latency next to
the expected mean, `(248 * nv + 20) / pt`, which assumes 8 stripe-test cycles per test cycle.
It runs in under a minute.
