// tb_nmr_voter: random triples with 0, 1 or 2 corrupted copies; checks the bitwise majority,
// the per-module disagreement flags, the uncertain flag and the one-clock latency.
module tb_nmr_voter;
  localparam int W = 192;
  logic clk = 0, rst = 1;
  logic in_valid, out_valid, uncertain;
  logic [W-1:0] d0, d1, d2, q;
  logic [2:0] disagree;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  nmr_voter #(.W(W)) dut (.*);

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
    in_valid = 0; d0 = 0; d1 = 0; d2 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] good, e0, e1, e2, expq;
      logic [2:0] expd;
      int mode;
      for (int k = 0; k < W / 32; k++) good[32*k +: 32] = $urandom;
      e0 = 0; e1 = 0; e2 = 0;
      mode = i % 4;
      if (mode == 1) e0[$urandom % W] = 1;
      if (mode == 2) begin e1[$urandom % W] = 1; e1[$urandom % W] = 1; end
      if (mode == 3) begin e1[5] = 1; e2[9] = 1; end
      @(negedge clk);
      in_valid = 1; d0 = good ^ e0; d1 = good ^ e1; d2 = good ^ e2;
      expq = good;
      expd = {e2 != 0, e1 != 0, e0 != 0};
      @(negedge clk);
      in_valid = 0;
      check(out_valid && q == expq, "majority value");
      check(disagree == expd, "disagreement flags");
      check(uncertain == (mode == 3), "uncertain flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
