// pr_cfg_ctrl: configuration controller with tunable built-in applicable self-test.
//
// Normal operation (pipelined reconfiguration): every cycle the next virtual stripe of
// the application is copied from the configuration memory into the next physical stripe
// of the ring, so the virtual pipeline scrolls through the fabric. After the last
// virtual stripe it starts again with the first. A stripe marked bad is skipped: its
// slot in the rotation is spent idle, so the configurations and data meant for it reach
// the next stripe one cycle later, costing about 1/NP of the throughput.
//
// Self-test insertion: at the end of a pass of the virtual pipeline the controller may
// insert a stripe-test cycle. It stops configuring, lets the application drain (NP
// cycles, no input accepted), clears the fabric and places the twelve-stripe test block
// (see biast_cfg_gen) at a base stripe. Then, for each application stripe k in turn
// (a configuration cycle), it runs ND LFSR steps through the two stripes under test and
// checks the compare stripe. The first configuration cycle writes 11 stripes, later
// ones rewrite only the six reroute and SUT stripes, giving NV*(ND+6)+5 cycles per
// stripe-test cycle, plus 3 cycles at the end for the last vectors to reach the compare
// stripe. Afterwards the fabric is cleared and the application restarts with its first
// virtual stripe.
//
// Tuning: pt is the percentage of cycles devoted to test. A credit counter adds pt for
// every application cycle and subtracts 100-pt for every test cycle; a test is inserted
// at a pass boundary whenever the credit is positive, so in the long run the test share
// of the cycles approaches pt percent.
//
// Moving the test block: the stripes under test sit at base+3 and base+9. The
// controller keeps a mask of stripes already tested in the current test cycle and picks
// the next base (searching onwards from the last one) whose window of eleven stripes has
// no bad stripe and whose SUTs include an untested stripe. Links with a repair entry
// are allowed inside the window only where they do not carry the spare register the
// test block uses. When no such base remains,
// the test cycle is complete (test_cycle_done) and the mask is cleared. If no window
// is free of bad stripes at all, testing is suspended (test_blocked).
//
// A mismatch stops the controller in a fault state (fault_detected, with the base and
// the application stripe that revealed it) until the host, after isolating the fault
// and updating bad_mask, pulses resume; the test cycle then restarts from scratch.
// With init_test set, a complete test cycle is run before the application starts; its
// cycles are not charged against the application's test share.
// During the drain the application stripes keep running (test_mode stays low) so that
// the words already taken in still come out; only new input is refused.
//
// The document defines the test block, its timing and the goal of moving it; the credit
// counter, the base search, the drain length and the fault stop are this design's
// choices.
//
// Resident mode: an application with fewer virtual stripes than the fabric has good
// stripes is configured once (nv cycles) and then held (S_HOLD): the controller stops
// writing stripes, the pipeline takes one input word per cycle, and a test is inserted
// as soon as the credit is positive. After the test the application is configured
// again. Scrolling such an application would leave two copies of its first stripe in
// the fabric, both taking input. The resident/virtualized decision follows the
// document's N_v > N_p versus N_v <= N_p cases; holding the pipeline is this design's
// choice.
module pr_cfg_ctrl
  import pr_pkg::*;
#(
  parameter int unsigned NP     = 16,
  parameter int unsigned NV_MAX = 256,
  parameter int unsigned ND     = 56
) (
  input  logic        clk,
  input  logic        rst_n,
  // host control
  input  logic        start,
  input  logic        init_test,
  input  logic        resume,
  input  logic [$clog2(NV_MAX+1)-1:0] nv,      // virtual stripes of the application
  input  logic [6:0]  pt,                      // percent of cycles for test, 0..100
  input  logic [NP-1:0] bad_mask,
  input  logic [NP-1:0][NPE-1:0] fix_en,      // interstripe lines under repair, per PE
  // configuration memory read port
  output logic [$clog2(NV_MAX)-1:0] mem_addr,
  input  stripe_cfg_t mem_data,
  // fabric control
  output logic        cfg_we,
  output logic [$clog2(NP)-1:0] cfg_sel,
  output stripe_cfg_t cfg_out,
  output logic        cfg_clear,
  output logic        accept_in,
  output logic        test_mode,
  output logic        lfsr_step,
  output logic        chk_en,
  input  logic        err,
  // status
  output logic        running,
  output logic        fault_detected,
  output logic [$clog2(NP)-1:0] fault_base,
  output logic [$clog2(NV_MAX)-1:0] fault_vstripe,
  output logic        stripe_test_done,   // pulse: one stripe-test cycle finished
  output logic        test_cycle_done,    // pulse: every testable stripe has been a SUT
  output logic        test_blocked,
  output logic [NP-1:0] tested,
  output logic [31:0] app_cycles,
  output logic [31:0] test_cycles,
  output logic [31:0] vectors_checked
);

  localparam int unsigned PW  = $clog2(NP);
  localparam int unsigned VW  = $clog2(NV_MAX);
  localparam int unsigned SUT_A = 3;
  localparam int unsigned SUT_B = 9;
  localparam int unsigned WIN   = 11;   // stripes in use by the test block

  typedef enum logic [3:0] {
    S_IDLE, S_RUN, S_HOLD, S_DRAIN, S_PICK, S_TCFG, S_TRUN, S_TRCFG, S_TAIL
  } state_e;

  state_e          state;
  logic            halted;          // fault stop
  logic [PW-1:0]   ptr, base, last_base;
  logic [VW-1:0]   v, k;
  logic [5:0]      cnt;
  logic [$clog2(ND+1)-1:0] vec;
  logic [3:0]      slot, gen_slot;
  logic [2:0]      step_d;
  logic            err_seen;
  logic            init_run;
  logic signed [31:0] credit;
  stripe_cfg_t     gen_cfg;

  // Base search
  logic            found_t, found_0;
  logic [PW-1:0]   pick_t, pick_0;

  function automatic logic [PW-1:0] wrap(input int unsigned i);
    return PW'(i % NP);
  endfunction

  always_comb begin
    found_t = 1'b0;
    found_0 = 1'b0;
    pick_t  = '0;
    pick_0  = '0;
    for (int unsigned off = 1; off <= NP; off++) begin
      automatic logic [PW-1:0] b = wrap(int'(last_base) + off);
      automatic logic adm = 1'b1;
      for (int unsigned j = 0; j < WIN; j++) begin
        automatic logic [PW-1:0] l = wrap(int'(b) + j);
        if (bad_mask[l])
          adm = 1'b0;
        // A repaired link lends its spare line to the redirected register, so it must
        // not carry spare-register test data: the spare registers entering the SUTs
        // and the write and compare slots (links into slots 3, 4, 9, 10) or, for
        // PEs 0 and 1, the LFSR values (links into slots 1, 2, 7, 8).
        if (j > 0 && (((fix_en[l] != '0) && (j inside {3, 4, 9, 10})) ||
            ((fix_en[l][1:0] != '0) && (j inside {1, 2, 7, 8}))))
          adm = 1'b0;
      end
      if (adm && !found_0) begin
        found_0 = 1'b1;
        pick_0  = b;
      end
      if (adm && !found_t && (!tested[wrap(int'(b) + SUT_A)] || !tested[wrap(int'(b) + SUT_B)])) begin
        found_t = 1'b1;
        pick_t  = b;
      end
    end
  end

  // Slot order of a reconfiguration: the reroute and SUT stripes of both halves.
  always_comb begin
    unique case (cnt[2:0])
      3'd0:    slot = 4'd1;
      3'd1:    slot = 4'd2;
      3'd2:    slot = 4'd3;
      3'd3:    slot = 4'd7;
      3'd4:    slot = 4'd8;
      default: slot = 4'd9;
    endcase
  end

  assign gen_slot = (state == S_TCFG) ? cnt[3:0] : slot;

  biast_cfg_gen u_gen (
    .slot    (gen_slot),
    .app_cfg (mem_data),
    .cfg     (gen_cfg)
  );

  logic test_due;
  assign test_due = (pt != 7'd0) && (credit > 0);

  // An application shorter than the number of good stripes stays resident once loaded.
  logic resident;
  assign resident = nv < ($clog2(NV_MAX+1))'($countones(~bad_mask));

  always_comb begin
    mem_addr  = (state == S_RUN) ? v : k;
    cfg_we    = 1'b0;
    cfg_sel   = ptr;
    cfg_out   = mem_data;
    cfg_out.is_test = 1'b0;
    cfg_out.rd_in   = (v == '0);
    cfg_out.wr_out  = ({1'b0, v} == nv - 1'b1);
    cfg_out.tag     = TAGW'(v);
    if (!halted) begin
      unique case (state)
        S_RUN:   cfg_we = !bad_mask[ptr];
        S_TCFG:  begin
          cfg_we  = 1'b1;
          cfg_sel = wrap(int'(base) + int'(cnt));
          cfg_out = gen_cfg;
        end
        S_TRCFG: begin
          cfg_we  = 1'b1;
          cfg_sel = wrap(int'(base) + int'(slot));
          cfg_out = gen_cfg;
        end
        default: ;
      endcase
    end
    accept_in = (state inside {S_RUN, S_HOLD}) && !halted;
    test_mode = (state inside {S_PICK, S_TCFG, S_TRUN, S_TRCFG, S_TAIL}) || halted;
    lfsr_step = (state == S_TRUN) && !halted;
    chk_en    = step_d[2];
    running   = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      halted           <= 1'b0;
      ptr              <= '0;
      base             <= '0;
      last_base        <= PW'(NP - 1);
      v                <= '0;
      k                <= '0;
      cnt              <= '0;
      vec              <= '0;
      step_d           <= '0;
      err_seen         <= 1'b0;
      init_run         <= 1'b0;
      credit           <= '0;
      cfg_clear        <= 1'b0;
      fault_detected   <= 1'b0;
      fault_base       <= '0;
      fault_vstripe    <= '0;
      stripe_test_done <= 1'b0;
      test_cycle_done  <= 1'b0;
      test_blocked     <= 1'b0;
      tested           <= '0;
      app_cycles       <= '0;
      test_cycles      <= '0;
      vectors_checked  <= '0;
    end else begin
      cfg_clear        <= 1'b0;
      stripe_test_done <= 1'b0;
      test_cycle_done  <= 1'b0;
      step_d           <= {step_d[1:0], lfsr_step};
      if (chk_en) begin
        vectors_checked <= vectors_checked + 1;
        if (err)
          err_seen <= 1'b1;
      end

      if ((state inside {S_RUN, S_HOLD}) && !halted) begin
        app_cycles <= app_cycles + 1;
        credit     <= credit + 32'(pt);
      end else if (state != S_IDLE && !halted) begin
        test_cycles <= test_cycles + 1;
        credit      <= credit - (32'sd100 - 32'(pt));
      end

      if (halted) begin
        if (resume) begin
          halted         <= 1'b0;
          fault_detected <= 1'b0;
          tested         <= '0;
          cfg_clear      <= 1'b1;
          v              <= '0;
          state          <= S_RUN;
        end
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            cfg_clear <= 1'b1;
            v         <= '0;
            ptr       <= '0;
            credit    <= '0;
            tested    <= '0;
            init_run  <= init_test;
            state     <= init_test ? S_PICK : S_RUN;
          end
          S_RUN: begin
            ptr <= wrap(int'(ptr) + 1);
            if (!bad_mask[ptr]) begin
              if ({1'b0, v} == nv - 1'b1) begin
                v <= '0;
                if (test_due) begin
                  state <= S_DRAIN;
                  cnt   <= '0;
                end else if (resident) begin
                  state <= S_HOLD;
                end
              end else begin
                v <= v + 1'b1;
              end
            end
          end
          S_HOLD: if (test_due) begin
            state <= S_DRAIN;
            cnt   <= '0;
          end
          S_DRAIN: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'(NP - 1))
              state <= S_PICK;
          end
          S_PICK: begin
            cfg_clear <= 1'b1;
            cnt       <= '0;
            k         <= '0;
            err_seen  <= 1'b0;
            if (found_t) begin
              base      <= pick_t;
              last_base <= pick_t;
              state     <= S_TCFG;
            end else begin
              // test cycle complete: start the next one
              tested          <= '0;
              test_cycle_done <= 1'b1;
              init_run        <= 1'b0;
              if (init_run)
                credit <= '0;   // the power-on test is not charged to the application
              test_blocked    <= !found_0;
              if (found_0 && !init_run) begin
                base      <= pick_0;
                last_base <= pick_0;
                state     <= S_TCFG;
              end else begin
                v     <= '0;
                state <= S_RUN;
              end
            end
          end
          S_TCFG: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'(WIN - 1)) begin
              cnt   <= '0;
              vec   <= '0;
              state <= S_TRUN;
            end
          end
          S_TRUN: begin
            vec <= vec + 1'b1;
            if (vec == ($clog2(ND+1))'(ND - 1)) begin
              cnt <= '0;
              if ({1'b0, k} == nv - 1'b1) begin
                state <= S_TAIL;
              end else begin
                k     <= k + 1'b1;
                state <= S_TRCFG;
              end
            end
          end
          S_TRCFG: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd5) begin
              cnt   <= '0;
              vec   <= '0;
              state <= S_TRUN;
            end
          end
          S_TAIL: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd2) begin
              stripe_test_done <= 1'b1;
              cfg_clear        <= 1'b1;
              if (err_seen || (chk_en && err)) begin
                halted         <= 1'b1;
                fault_detected <= 1'b1;
                fault_base     <= base;
                fault_vstripe  <= k;
                state          <= S_PICK;
              end else begin
                tested[wrap(int'(base) + SUT_A)] <= 1'b1;
                tested[wrap(int'(base) + SUT_B)] <= 1'b1;
                ptr   <= wrap(int'(base) + 12);
                v     <= '0;
                state <= init_run ? S_PICK : S_RUN;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
