// tb_sync_fifo: random push/pop traffic against a queue model; checks order, empty/full,
// count, simultaneous push and pop, and the overflow flag.
module tb_sync_fifo;
  localparam int W = 11, D = 8;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full, overflow;
  logic [W-1:0] din, dout;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0) && full == (model.size() == D) && count == model.size(),
            $sformatf("flags and count e%0d f%0d c%0d model %0d", empty, full, count, model.size()));
      if (!empty) check(dout == model[0], "head");
      push = ($urandom % 3 != 0) && model.size() < D;
      pop  = ($urandom % 2 == 0) && i != 100;
      din  = W'($urandom);
      if (i > 1950) push = 0;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && model.size() < D) model.push_back(din);
    end
    check(!overflow, "no overflow yet");
    // fill and overflow
    @(negedge clk);
    pop = 0; push = 1;
    repeat (D + 2) @(negedge clk);
    push = 0;
    @(negedge clk);
    check(full && overflow, "overflow flagged when pushing into a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
