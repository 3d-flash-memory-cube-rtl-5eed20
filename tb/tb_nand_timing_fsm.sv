// tb_nand_timing_fsm: checks the bus cycles of the NAND timing FSM.
//
// For each operation type it measures how many clocks WE_n or RE_n stays low and high, that
// CLE/ALE/DOS_i are raised only for their cycle types, that DIS pulses once in the last RE_n
// low clock, that t_done comes in the final clock and that T_WAIT lasts until R_nB rises.
module tb_nand_timing_fsm;
  import flash_pkg::*;

  localparam int TWP = 3, TWH = 2, TRP = 4, TREH = 2, TWB = 4;

  logic clk = 0, rst = 1;
  logic t_start, ce_hold, R_nB;
  tcmd_e t_cmd;
  logic t_done, DOS_i, DIS, CLE, ALE, WE_n, RE_n, CE_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // die stand-in: R_nB low while busy_left counts down
  int busy_left = 0;
  always @(posedge clk) if (busy_left > 0) busy_left <= busy_left - 1;
  assign R_nB = (busy_left == 0);

  nand_timing_fsm #(.TWP(TWP), .TWH(TWH), .TRP(TRP), .TREH(TREH), .TWB(TWB)) dut (.*);

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

  // run one op; record per-clock samples until t_done
  task automatic run(tcmd_e c, output int we_lo, output int re_lo, output int len,
                     output int n_cle, output int n_ale, output int n_dis, output int n_dos,
                     output int n_ce);
    we_lo = 0; re_lo = 0; len = 0; n_cle = 0; n_ale = 0; n_dis = 0; n_dos = 0; n_ce = 0;
    @(negedge clk);
    t_start = 1; t_cmd = c;
    @(negedge clk);
    t_start = 0;
    forever begin
      len++;
      if (!WE_n) we_lo++;
      if (!RE_n) re_lo++;
      if (CLE) n_cle++;
      if (ALE) n_ale++;
      if (DIS) begin
        n_dis++;
        check(!RE_n, "DIS while RE_n low");
      end
      if (DOS_i) n_dos++;
      if (!CE_n) n_ce++;
      if (t_done) break;
      @(negedge clk);
      if (len > 200) break;
    end
  endtask

  initial begin
    int we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce;
    t_start = 0; t_cmd = T_CMD; ce_hold = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    check(CE_n && WE_n && RE_n, "idle levels");

    run(T_CMD, we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce);
    check(we_lo == TWP && len == TWP + TWH, $sformatf("command cycle WE_n low %0d, length %0d", we_lo, len));
    check(n_cle == TWP + TWH && n_ale == 0 && n_dos == TWP + TWH && n_ce == len, "command: CLE/ALE/DOS/CE");

    run(T_ADDR, we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce);
    check(we_lo == TWP && n_ale == TWP + TWH && n_cle == 0, "address cycle");

    run(T_DIN, we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce);
    check(we_lo == TWP && n_ale == 0 && n_cle == 0 && n_dos == TWP + TWH, "data-in cycle");

    run(T_DOUT, we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce);
    check(re_lo == TRP && len == TRP + TREH && we_lo == 0, $sformatf("data-out cycle RE_n low %0d", re_lo));
    check(n_dis == 1 && n_dos == 0, "one DIS strobe, I/O not driven");

    // wait: R_nB low for 20 clocks after the op starts
    busy_left = 22;
    run(T_WAIT, we_lo, re_lo, len, n_cle, n_ale, n_dis, n_dos, n_ce);
    check(len >= 20 && len <= 24 && R_nB && we_lo == 0 && re_lo == 0, $sformatf("wait length %0d", len));

    ce_hold = 1;
    @(negedge clk);
    check(!CE_n, "CE_n held by ce_hold");
    ce_hold = 0;
    @(negedge clk);
    check(CE_n, "CE_n released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
