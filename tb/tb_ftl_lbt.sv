// tb_ftl_lbt: the logical block table with a reduced address width (2^12 entries instead of
// 2^24). The processor writes random entries; lookups of random logical sector addresses must
// return, one clock later, the block and valid bit of entry lsa/16 and the sector offset
// lsa%16.
module tb_ftl_lbt;
  import flash_pkg::*;
  localparam int LW = 16;
  logic clk = 0, rst = 1;
  logic lk_req, lk_ack, lk_valid, up_en;
  logic [LW-1:0] lk_lsa;
  logic [BLOCK_W-1:0] lk_block;
  logic [3:0] lk_sector;
  logic [LW-5:0] up_index;
  logic [31:0] up_entry;
  int checks = 0, failures = 0;
  logic [31:0] model [int];

  always #5 clk = ~clk;
  ftl_lbt #(.LSA_W(LW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_req = 0; lk_lsa = 0; up_en = 0; up_index = 0; up_entry = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1 << (LW - 4); i++) begin
      up_en = 1; up_index = (LW-4)'(i); up_entry = $urandom;
      model[i] = up_entry;
      @(negedge clk);
    end
    up_en = 0;
    for (int k = 0; k < 2000; k++) begin
      automatic int idx;
      lk_req = 1; lk_lsa = LW'($urandom);
      idx = int'(lk_lsa) >> 4;
      // an update in the same cycle to another entry must not disturb the lookup
      up_en = ($urandom % 2 == 0); up_index = (LW-4)'($urandom); up_entry = $urandom;
      if (up_index == (LW-4)'(idx)) up_en = 0;
      @(negedge clk);
      if (up_en) model[int'(up_index)] = up_entry;
      check(lk_ack && lk_block == model[idx][BLOCK_W-1:0] && lk_valid == model[idx][31]
            && lk_sector == lk_lsa[3:0] , "lookup result");
      lk_req = 0; up_en = 0;
      if (k % 7 == 0) begin
        @(negedge clk);
        check(!lk_ack, "ack only after a request");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
