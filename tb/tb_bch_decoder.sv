// tb_bch_decoder: self-checking test of the BCH[4382,4096] t = 22 decoder.
//
// Random sectors are encoded with the reference package, a known set of bit errors is flipped
// and the codeword is fed to the decoder. The emitted byte masks must equal the injected error
// pattern, err_count the number of errors, errors_present whether any were injected, and fail
// must stay low up to t = 22 errors and rise for 30. A second mode feeds only the difference of
// received and recomputed parity (the way the page ECC uses the decoder) and expects the same
// error locations. The latency from the last input byte to done is checked too.
module tb_bch_decoder;
  import flash_pkg::*;
  import bch_ref_pkg::*;

  localparam int IW = $clog2(CW_BYTES);

  logic clk = 0, rst = 1;
  logic start, in_valid, in_last;
  logic [7:0] in_data;
  logic ready, out_valid, done, errors_present, fail;
  logic [IW-1:0] out_idx;
  logic [7:0] out_mask;
  logic [$clog2(BCH_T+1):0] err_count;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bch_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned mask_got [0:CW_BYTES-1];
  int done_cyc;
  always @(posedge clk) begin
    if (!rst && out_valid) mask_got[out_idx] <= out_mask;
    if (!rst && done) done_cyc <= cyc;
  end

  // Run one codeword with nerr errors; diff_mode feeds only the parity difference.
  task automatic run(int nerr, bit diff_mode);
    automatic bit dbits[$] = {};
    automatic bit pbits[$] = {};
    automatic bit rpbits[$] = {};
    automatic bit cw[$] = {};
    automatic bit err[$] = {};
    automatic byte unsigned bytes_in[$] = {};
    automatic int last_cyc = 0;
    automatic int n;
    automatic bit ok;
    for (int i = 0; i < BCH_K; i++) dbits.push_back(1'($urandom));
    ref_parity(dbits, pbits);
    cw = dbits;
    foreach (pbits[i]) cw.push_back(pbits[i]);
    for (int i = 0; i < CW_BYTES * 8; i++) err.push_back(0);
    n = 0;
    while (n < nerr) begin
      int p;
      p = $urandom % BCH_N;
      if (!err[p]) begin
        err[p] = 1;
        cw[p] ^= 1;
        n++;
      end
    end
    if (!diff_mode) begin
      for (int i = 0; i < CW_BYTES * 8; i++) begin
        if (i % 8 == 0) bytes_in.push_back(0);
        if (i < BCH_N) bytes_in[i / 8][7 - i % 8] = cw[i];
      end
    end else begin
      // recompute parity from the received data, XOR with the received parity
      automatic bit rd[$] = cw[0:BCH_K-1];
      ref_parity(rd, rpbits);
      for (int i = 0; i < PAR_BYTES * 8; i++) begin
        if (i % 8 == 0) bytes_in.push_back(0);
        if (i < BCH_P) bytes_in[i / 8][7 - i % 8] = cw[BCH_K + i] ^ rpbits[i];
      end
    end
    foreach (mask_got[i]) mask_got[i] = 8'h00;
    foreach (bytes_in[i]) begin
      while (!ready) @(posedge clk);
      start <= (i == 0); in_valid <= 1; in_data <= bytes_in[i];
      in_last <= (i == bytes_in.size() - 1);
      @(posedge clk);
      last_cyc = cyc;
    end
    start <= 0; in_valid <= 0; in_last <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(posedge clk);
    if (nerr <= BCH_T) begin
      ok = 1;
      for (int i = 0; i < CW_BYTES; i++)
        for (int b = 0; b < 8; b++) if (mask_got[i][7 - b] != err[i * 8 + b]) ok = 0;
      check(ok, $sformatf("%0d errors (diff=%0b): error locations", nerr, diff_mode));
      check(!fail, $sformatf("%0d errors: no failure flag", nerr));
      check(err_count == nerr, $sformatf("%0d errors: err_count=%0d", nerr, err_count));
    end else begin
      check(fail, $sformatf("%0d errors: failure flagged", nerr));
    end
    check(errors_present == (nerr != 0), $sformatf("%0d errors: errors_present", nerr));
    // done is set 2t+CW_BYTES+2 edges after in_last is taken and sampled one edge later here
    check(done_cyc - last_cyc == 2 * BCH_T + CW_BYTES + 3,
          $sformatf("latency %0d cycles", done_cyc - last_cyc));
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0; in_last = 0;
    build();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run(0, 0);
    run(1, 0);
    run(7, 0);
    run(BCH_T, 0);
    run(3, 1);
    run(BCH_T, 1);
    run(30, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
