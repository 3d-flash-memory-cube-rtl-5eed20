// tb_free_block_table: the processor fills slots with free block numbers; allocations must
// return them in slot order, level must count the filled slots, and when the slot at the read
// pointer is empty the table must fall back to round robin over the block range (skipping
// the reserved first blocks and wrapping at the end).
module tb_free_block_table;
  import flash_pkg::*;
  localparam int S = 16, NB = 1 << BLOCK_W, RRF = 8;
  logic clk = 0, rst = 1;
  logic wr_en, alloc, alloc_rr;
  logic [$clog2(S)-1:0] wr_addr;
  logic [BLOCK_W-1:0] wr_block, alloc_block;
  logic [$clog2(S):0] level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  free_block_table dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [BLOCK_W-1:0] blks[S];
    automatic int rr = RRF;
    wr_en = 0; alloc = 0; wr_addr = 0; wr_block = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(level == 0 && alloc_rr && alloc_block == BLOCK_W'(RRF), "empty table uses round robin");
    for (int i = 0; i < S; i++) begin
      blks[i] = BLOCK_W'(RRF + $urandom % (NB - RRF));
      wr_en = 1; wr_addr = 4'(i); wr_block = blks[i];
      @(negedge clk);
    end
    wr_en = 0;
    check(level == S, "full level");
    for (int i = 0; i < S; i++) begin
      check(!alloc_rr && alloc_block == blks[i], $sformatf("slot %0d", i));
      alloc = 1;
      @(negedge clk);
      alloc = 0;
      check(level == S - 1 - i, "level decreases");
    end
    // round robin through the end of the range
    for (int i = 0; i < NB + 5; i++) begin
      check(alloc_rr && alloc_block == BLOCK_W'(rr), "round-robin block");
      alloc = 1;
      @(negedge clk);
      alloc = 0;
      rr = (rr == NB - 1) ? RRF : rr + 1;
    end
    // refill one slot at the read pointer: used next
    wr_en = 1; wr_addr = 0; wr_block = 11'd77;
    @(negedge clk);
    wr_en = 0;
    check(!alloc_rr && alloc_block == 11'd77 && level == 1, "refilled slot used first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
