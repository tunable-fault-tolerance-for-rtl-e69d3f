// tb_fault_isolator: drives the three-stage isolation procedure with a model test
// runner. For each of the four fault cases (none, source stripe, compare stripe, the
// resource) the runner fails a stage exactly when a faulty part is involved, and the
// verdict and the sequence of (source, compare) pairs requested are checked.
module tb_fault_isolator;
  localparam int unsigned NP = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, req, ack, res_valid, res_fail, busy, done;
  logic [3:0] src, alt_src, cmp, alt_cmp, req_src, req_cmp;
  logic [1:0] req_stage, verdict;
  int checks = 0, failures = 0;

  fault_isolator #(.NP(NP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // faulty: 0 none, 1 source, 2 compare, 3 resource
  task automatic run_case(input int faulty);
    int nreq;
    int exp_stages;
    nreq = 0;
    src = 4'($urandom); alt_src = src - 1; cmp = src + 1; alt_cmp = src + 2;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin
      if (req) begin
        bit fail;
        nreq++;
        // requested pair for this stage
        unique case (req_stage)
          2'd1: begin expect_eq(req_src, src, "stage1 src");     expect_eq(req_cmp, cmp, "stage1 cmp"); end
          2'd2: begin expect_eq(req_src, alt_src, "stage2 src"); expect_eq(req_cmp, cmp, "stage2 cmp"); end
          default: begin expect_eq(req_src, src, "stage3 src");  expect_eq(req_cmp, alt_cmp, "stage3 cmp"); end
        endcase
        fail = (faulty == 3) || (faulty == 1 && req_src == src) || (faulty == 2 && req_cmp == cmp);
        ack = 1; @(negedge clk); ack = 0;
        repeat ($urandom_range(3)) @(negedge clk);
        res_valid = 1; res_fail = fail; @(negedge clk); res_valid = 0; res_fail = 0;
      end else begin
        @(negedge clk);
      end
    end
    exp_stages = (faulty == 0) ? 1 : (faulty == 1) ? 2 : 3;
    expect_eq(nreq, exp_stages, "stages run");
    expect_eq(verdict, faulty, "verdict");
    @(negedge clk);
    expect_eq(busy, 0, "idle after verdict");
  endtask

  initial begin
    rst_n = 0; start = 0; ack = 0; res_valid = 0; res_fail = 0;
    src = 0; alt_src = 0; cmp = 0; alt_cmp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) run_case(t % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
