// tb_scrub_policy: random read results against the rule: no request at or below the error
// threshold; above it, rewrite below the P/E limit and relocate at or above it; relocate on
// an uncorrectable read. The request follows rd_done by one clock.
module tb_scrub_policy;
  import flash_pkg::*;
  localparam int EW = $clog2(BCH_T + 1) + 1;
  logic clk = 0, rst = 1;
  logic rd_done, ecc_fail, req_valid, req_relocate;
  logic [BLOCK_W-1:0] block, req_block;
  logic [EW-1:0] max_err, err_thr;
  logic [15:0] pe_count, pe_limit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  scrub_policy dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_done = 0; ecc_fail = 0; block = 0; max_err = 0; err_thr = 10; pe_count = 0; pe_limit = 3000;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      bit exp_req, exp_rel;
      @(negedge clk);
      rd_done  = 1;
      block    = BLOCK_W'($urandom);
      max_err  = EW'($urandom % 23);
      ecc_fail = ($urandom % 10 == 0);
      pe_count = 16'($urandom % 6000);
      err_thr  = EW'(4 + $urandom % 12);
      exp_req  = ecc_fail || max_err > err_thr;
      exp_rel  = ecc_fail || pe_count >= pe_limit;
      @(negedge clk);
      rd_done = 0;
      check(req_valid == exp_req, "request when errors exceed the threshold");
      if (exp_req) check(req_relocate == exp_rel && req_block == block, "rewrite/relocate choice");
      @(negedge clk);
      check(!req_valid, "single request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
