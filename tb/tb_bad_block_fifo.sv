// tb_bad_block_fifo: checks the bad-block queue of the controller.
//
// A program event with a random per-die fail vector must queue one WRITE_FAIL entry per
// failing die, lowest die first, one per clock; a read event must queue READ_ERR entries for
// dies whose worst sector exceeded the threshold and READ_FAIL entries for uncorrectable dies.
// irq follows the non-empty queue; popping returns the entries in order; overflow is set when
// more entries arrive than the queue holds.
module tb_bad_block_fifo;
  import flash_pkg::*;
  localparam int ND = NDIE;
  localparam int EW = $clog2(BCH_T + 1) + 1;
  localparam int D  = 16;

  logic clk = 0, rst = 1;
  logic wr_event, rd_event, busy, irq, pop, overflow;
  logic [BLOCK_W-1:0] block;
  logic [ND-1:0] fail_vec, ecc_fail;
  logic [ND*EW-1:0] max_err;
  logic [EW-1:0] err_thr;
  logic [17:0] entry;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [17:0] exp_q[$];

  always #5 clk = ~clk;
  bad_block_fifo #(.DEPTH(D)) dut (.*);

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

  task automatic drain();
    while (busy) @(negedge clk);
    check(count == exp_q.size(), $sformatf("queued %0d expected %0d", count, exp_q.size()));
    check(irq == (exp_q.size() != 0), "irq");
    while (exp_q.size() > 0) begin
      check(entry == exp_q[0], $sformatf("entry %h expected %h", entry, exp_q[0]));
      void'(exp_q.pop_front());
      pop = 1;
      @(negedge clk);
      pop = 0;
    end
    check(!irq, "irq clears");
  endtask

  initial begin
    wr_event = 0; rd_event = 0; pop = 0; block = 0; fail_vec = 0; ecc_fail = 0; max_err = 0;
    err_thr = 8;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 40; it++) begin
      automatic int n = 0;
      @(negedge clk);
      block = BLOCK_W'($urandom);
      if (it % 2 == 0) begin
        fail_vec = '0;
        for (int k = 0; k < 1 + $urandom % 4; k++) fail_vec[$urandom % ND] = 1'b1;
        for (int i = 0; i < ND; i++) if (fail_vec[i]) exp_q.push_back({2'd1, 5'(i), block});
        wr_event = 1;
      end else begin
        ecc_fail = '0;
        for (int i = 0; i < ND; i++) begin
          max_err[EW*i +: EW] = ($urandom % 6 == 0) ? EW'(9 + $urandom % 14) : EW'($urandom % 9);
          if ($urandom % 20 == 0) ecc_fail[i] = 1'b1;
          if (ecc_fail[i]) exp_q.push_back({2'd3, 5'(i), block});
          else if (max_err[EW*i +: EW] > err_thr) exp_q.push_back({2'd2, 5'(i), block});
          if (exp_q.size() > D) begin   // keep within the queue; overflow is tested below
            void'(exp_q.pop_back());
            ecc_fail[i] = 1'b0; max_err[EW*i +: EW] = '0;
          end
        end
        rd_event = 1;
      end
      @(negedge clk);
      wr_event = 0; rd_event = 0;
      drain();
    end
    check(!overflow, "no overflow in normal use");
    // every die fails: 24 entries into a 16-deep queue
    @(negedge clk);
    fail_vec = '1; wr_event = 1;
    @(negedge clk);
    wr_event = 0;
    while (busy) @(negedge clk);
    check(overflow && count == D, "overflow when the queue is full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
