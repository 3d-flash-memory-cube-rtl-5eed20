// tb_bch_encoder: self-checking test of the byte-serial BCH[4382,4096] encoder.
//
// Encodes three random 512-byte sectors (with input gaps and output back-pressure on the
// parity bytes) and compares against the reference package: the echoed data, the 36 parity
// bytes from an independent long division, zero syndromes S_1..S_44 of the whole codeword,
// the generator constant itself, the first/last/is_data/is_ecc flags and the parity timing
// (36 parity bytes in 36 cycles when not throttled).
module tb_bch_encoder;
  import flash_pkg::*;
  import bch_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic start, in_valid, out_ready;
  logic [7:0] in_data;
  logic ready, out_valid, first, last, is_data, is_ecc;
  logic [7:0] out_data;
  logic [BCH_P-1:0] parity;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_encoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collector
  byte unsigned got[$];
  bit got_first[$], got_last[$], got_isd[$], got_ise[$];
  int  got_cyc[$];
  int  cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid && (is_data || out_ready)) begin
      got.push_back(out_data);
      got_first.push_back(first);
      got_last.push_back(last);
      got_isd.push_back(is_data);
      got_ise.push_back(is_ecc);
      got_cyc.push_back(cyc);
    end
  end

  initial begin
    bit ok;
    build();
    ok = 1;
    for (int k = 0; k <= BCH_P; k++) if (gen[k] != BCH_GEN[k]) ok = 0;
    check(ok, "generator polynomial constant");

    start = 0; in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      automatic byte unsigned d[$] = {};
      automatic bit dbits[$] = {};
      automatic bit pbits[$] = {};
      automatic bit cw[$] = {};
      automatic byte unsigned exp_par[$] = {};
      automatic int t0 = 0;
      got = {}; got_first = {}; got_last = {}; got_isd = {}; got_ise = {}; got_cyc = {};
      for (int i = 0; i < SECT_BYTES; i++) d.push_back(8'($urandom));
      if (s == 1) foreach (d[i]) d[i] = 8'hFF;
      for (int i = 0; i < SECT_BYTES; i++) begin
        if (s == 2 && ($urandom % 4 == 0)) begin
          in_valid <= 0; start <= 0;
          @(posedge clk);
        end
        in_valid <= 1; in_data <= d[i]; start <= (i == 0);
        @(posedge clk);
      end
      in_valid <= 0; start <= 0;
      // parity phase; throttle on sector 2
      t0 = 0;
      while (got.size() < CW_BYTES) begin
        out_ready <= (s != 2) || ($urandom % 2 == 0);
        @(posedge clk);
        t0++;
        if (t0 > 400) break;
      end
      out_ready <= 1;
      if (s == 0 && got.size() == CW_BYTES)
        check(got_cyc[CW_BYTES-1] - got_cyc[SECT_BYTES-1] == PAR_BYTES,
              $sformatf("parity bytes take %0d cycles", got_cyc[CW_BYTES-1] - got_cyc[SECT_BYTES-1]));
      // reference
      foreach (d[i]) for (int b = 7; b >= 0; b--) dbits.push_back(d[i][b]);
      ref_parity(dbits, pbits);
      for (int b = 0; b < PAR_BYTES * 8; b++) begin
        if (b % 8 == 0) exp_par.push_back(0);
        if (b < BCH_P) exp_par[b / 8][7 - (b % 8)] = pbits[b];
      end
      check(got.size() == CW_BYTES, $sformatf("sector %0d: %0d output bytes", s, got.size()));
      if (got.size() == CW_BYTES) begin
        ok = 1;
        for (int i = 0; i < SECT_BYTES; i++) if (got[i] != d[i] || !got_isd[i] || got_ise[i]) ok = 0;
        check(ok, $sformatf("sector %0d: data echo and is_data", s));
        ok = 1;
        for (int i = 0; i < PAR_BYTES; i++)
          if (got[SECT_BYTES + i] != exp_par[i] || !got_ise[SECT_BYTES + i] || got_isd[SECT_BYTES + i]) ok = 0;
        check(ok, $sformatf("sector %0d: parity bytes", s));
        check(got_first[0] && !got_first[1], "first flag");
        check(got_last[CW_BYTES-1] && !got_last[CW_BYTES-2], "last flag");
        // syndromes of the codeword built from the DUT output
        cw = dbits;
        for (int i = 0; i < PAR_BYTES; i++)
          for (int b = 7; b >= 0; b--) if (i * 8 + (7 - b) < BCH_P) cw.push_back(got[SECT_BYTES + i][b]);
        ok = 1;
        for (int j = 1; j <= 2 * BCH_T; j++) if (syndrome(cw, j) != 0) ok = 0;
        check(ok, $sformatf("sector %0d: codeword syndromes zero", s));
      end
      ok = 1;
      for (int b = 0; b < BCH_P; b++) if (parity[BCH_P-1-b] != pbits[b]) ok = 0;
      check(ok, "parity bus");
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
