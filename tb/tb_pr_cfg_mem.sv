// tb_pr_cfg_mem: writes random stripe configurations to random addresses of the
// configuration memory and reads them back against a shadow copy in the testbench.
module tb_pr_cfg_mem;
  import pr_pkg::*;

  localparam int unsigned NV_MAX = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [7:0] waddr, raddr;
  stripe_cfg_t wdata, rdata;
  stripe_cfg_t shadow [NV_MAX];
  logic        written [NV_MAX];
  int checks = 0, failures = 0;

  pr_cfg_mem #(.NV_MAX(NV_MAX)) dut (.*);

  function automatic stripe_cfg_t rand_cfg();
    logic [$bits(stripe_cfg_t)-1:0] v;
    for (int i = 0; i < $bits(stripe_cfg_t); i += 32)
      v = {v[$bits(stripe_cfg_t)-33:0], 32'($urandom)};
    return stripe_cfg_t'(v);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV_MAX; i++) written[i] = 0;
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = 8'($urandom);
      wdata = rand_cfg();
      raddr = 8'($urandom);
      #1;
      if (written[raddr]) begin
        checks++;
        if (rdata !== shadow[raddr]) begin
          failures++;
          $display("FAIL read %0d", raddr);
        end
      end
      @(posedge clk);
      if (we) begin shadow[waddr] = wdata; written[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
