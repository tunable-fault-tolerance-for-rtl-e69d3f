// fault_isolator: the three-stage decision procedure that locates a detected fault.
//
// A resource (for example the interstripe lines between two stripes) is tested by one
// stripe that stimulates it and one that checks the result. The procedure is:
//   stage 1: stimulus from src, check in cmp. Pass -> the resource is good.
//   stage 2: stimulus from the alternate source alt_src, check in cmp.
//            Pass -> src was faulty.
//   stage 3: stimulus from src, check in the alternate compare stripe alt_cmp.
//            Pass -> cmp was faulty; fail -> the resource itself is faulty.
// Each stage is one request on the test-runner handshake (req/ack, then a result pulse
// res_valid with res_fail); the runner configures the two stripes, applies the stimuli
// and reports whether any mismatch occurred. As in the document, the procedure assumes
// that a compare stripe and its alternate are not both faulty.
// Using the original source again in stage 3 is this design's choice (the document
// names only the alternate compare stripe for that stage).
// Timing: one request per stage; done pulses one cycle after the deciding result.
module fault_isolator
#(
  parameter int unsigned NP = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [$clog2(NP)-1:0] src,
  input  logic [$clog2(NP)-1:0] alt_src,
  input  logic [$clog2(NP)-1:0] cmp,
  input  logic [$clog2(NP)-1:0] alt_cmp,
  // test runner
  output logic        req,
  output logic [$clog2(NP)-1:0] req_src,
  output logic [$clog2(NP)-1:0] req_cmp,
  output logic [1:0]  req_stage,
  input  logic        ack,
  input  logic        res_valid,
  input  logic        res_fail,
  // verdict
  output logic        busy,
  output logic        done,
  output logic [1:0]  verdict     // 0 good, 1 source bad, 2 compare bad, 3 resource bad
);

  localparam logic [1:0] V_GOOD = 2'd0, V_SRC = 2'd1, V_CMP = 2'd2, V_RES = 2'd3;

  typedef enum logic [1:0] {I_IDLE, I_REQ, I_WAIT} istate_e;
  istate_e state;
  logic [1:0] stage;   // 1..3
  logic [$clog2(NP)-1:0] r_src, r_alt_src, r_cmp, r_alt_cmp;

  assign busy = (state != I_IDLE);
  assign req  = (state == I_REQ);
  assign req_stage = stage;

  always_comb begin
    unique case (stage)
      2'd2:    begin req_src = r_alt_src; req_cmp = r_cmp;     end
      2'd3:    begin req_src = r_src;     req_cmp = r_alt_cmp; end
      default: begin req_src = r_src;     req_cmp = r_cmp;     end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= I_IDLE;
      stage     <= 2'd1;
      done      <= 1'b0;
      verdict   <= V_GOOD;
      r_src     <= '0;
      r_alt_src <= '0;
      r_cmp     <= '0;
      r_alt_cmp <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        I_IDLE: if (start) begin
          r_src     <= src;
          r_alt_src <= alt_src;
          r_cmp     <= cmp;
          r_alt_cmp <= alt_cmp;
          stage     <= 2'd1;
          state     <= I_REQ;
        end
        I_REQ: if (ack) state <= I_WAIT;
        I_WAIT: if (res_valid) begin
          if (!res_fail) begin
            verdict <= (stage == 2'd1) ? V_GOOD : (stage == 2'd2) ? V_SRC : V_CMP;
            done    <= 1'b1;
            state   <= I_IDLE;
          end else if (stage == 2'd3) begin
            verdict <= V_RES;
            done    <= 1'b1;
            state   <= I_IDLE;
          end else begin
            stage <= stage + 2'd1;
            state <= I_REQ;
          end
        end
        default: state <= I_IDLE;
      endcase
    end
  end

  // The runner must not report a result while no request is outstanding.
  a_res_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> state == I_WAIT);

endmodule
