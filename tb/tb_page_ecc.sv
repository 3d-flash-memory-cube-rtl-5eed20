// tb_page_ecc: checks the per-die page ECC on a shortened two-sector page.
//
// Program direction: 1024 random data bytes are strobed in; the parity bytes offered for the
// spare area must equal the reference parity of each 512-byte sector. Read direction: the
// same data with injected bit errors (data and parity fields) is strobed in, then each
// sector's 36 stored spare bytes; the reported corrections (page column and bit mask) must be
// exactly the injected errors, max_err the larger per-sector count and page_fail low. A third
// pass with 30 errors in one sector must set page_fail.
module tb_page_ecc;
  import flash_pkg::*;
  import bch_ref_pkg::*;

  localparam int NS = 2;
  localparam int PB = NS * SECT_BYTES;
  localparam int EW = $clog2(BCH_T + 1) + 1;

  logic clk = 0, rst = 1;
  logic page_begin, data_stb, spare_stb, corr_valid, done, page_fail;
  logic [7:0] data_in, par_byte, spare_in, corr_mask;
  logic [$clog2(NS)-1:0] sect;
  logic [$clog2(SECT_BYTES)-1:0] sbyte;
  logic [$clog2(PAR_BYTES)-1:0] spk;
  logic [COL_W-1:0] corr_col;
  logic [EW-1:0] err_count, max_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  page_ecc #(.NSECT(NS)) dut (.*);

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

  byte unsigned data [PB];
  byte unsigned spare [NS * PAR_BYTES];
  byte unsigned errs [PB + NS * PAR_BYTES];
  byte unsigned got  [PB + NS * PAR_BYTES];
  always @(posedge clk) if (corr_valid) got[corr_col] <= got[corr_col] ^ corr_mask;

  task automatic read_pass();
    foreach (got[i]) got[i] = 0;
    @(posedge clk);
    page_begin <= 1;
    @(posedge clk);
    page_begin <= 0;
    for (int j = 0; j < PB; j++) begin
      data_stb <= 1; data_in <= data[j] ^ errs[j];
      sect <= ($clog2(NS))'(j / SECT_BYTES); sbyte <= ($clog2(SECT_BYTES))'(j % SECT_BYTES);
      @(posedge clk);
      data_stb <= 0;
      @(posedge clk);
    end
    for (int s = 0; s < NS; s++) begin
      sect <= ($clog2(NS))'(s);
      for (int k = 0; k < PAR_BYTES; k++) begin
        spk <= ($clog2(PAR_BYTES))'(k);
        spare_stb <= 1;
        spare_in <= spare[s * PAR_BYTES + k] ^ errs[PB + s * PAR_BYTES + k];
        @(posedge clk);
        spare_stb <= 0;
        @(posedge clk);
      end
      while (!done) @(posedge clk);
      @(posedge clk);
    end
    @(posedge clk);
  endtask

  initial begin
    automatic bit ok;
    page_begin = 0; data_stb = 0; spare_stb = 0; data_in = 0; spare_in = 0;
    sect = 0; sbyte = 0; spk = 0;
    build();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // program direction
    foreach (data[j]) data[j] = 8'($urandom);
    page_begin <= 1;
    @(posedge clk);
    page_begin <= 0;
    for (int j = 0; j < PB; j++) begin
      data_stb <= 1; data_in <= data[j];
      sect <= ($clog2(NS))'(j / SECT_BYTES); sbyte <= ($clog2(SECT_BYTES))'(j % SECT_BYTES);
      @(posedge clk);
    end
    data_stb <= 0;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      automatic bit db[$] = {};
      automatic bit pb[$] = {};
      for (int j = 0; j < SECT_BYTES; j++)
        for (int b = 7; b >= 0; b--) db.push_back(data[s * SECT_BYTES + j][b]);
      ref_parity(db, pb);
      ok = 1;
      for (int k = 0; k < PAR_BYTES; k++) begin
        automatic byte unsigned e = 0;
        for (int b = 0; b < 8; b++) if (k * 8 + b < BCH_P) e[7 - b] = pb[k * 8 + b];
        sect <= ($clog2(NS))'(s); spk <= ($clog2(PAR_BYTES))'(k);
        @(posedge clk);
        #1;
        if (par_byte != e) ok = 0;
        spare[s * PAR_BYTES + k] = par_byte;
      end
      check(ok, $sformatf("sector %0d parity bytes", s));
    end

    // read direction: sector 0: 5 errors in data, 1 in parity; sector 1: 12 errors
    foreach (errs[i]) errs[i] = 0;
    for (int e = 0; e < 5; e++) errs[$urandom % SECT_BYTES][$urandom % 8] = 1;
    errs[PB + 10][3] = 1;
    begin
      automatic int n = 0;
      while (n < 12) begin
        automatic int p = SECT_BYTES * 8 + $urandom % (SECT_BYTES * 8);
        if (!errs[p / 8][p % 8]) begin errs[p / 8][p % 8] = 1; n++; end
      end
    end
    read_pass();
    ok = 1;
    foreach (got[i]) if (got[i] != errs[i]) ok = 0;
    check(ok, "corrections equal injected errors");
    begin
      automatic int n0 = 0;
      for (int i = 0; i < SECT_BYTES; i++) n0 += $countones(errs[i]);
      n0 += $countones(errs[PB + 10]);
      check(max_err == 12 && n0 <= 12, $sformatf("max_err %0d", max_err));
    end
    check(!page_fail, "no failure");

    // uncorrectable sector
    foreach (errs[i]) errs[i] = 0;
    begin
      automatic int n = 0;
      while (n < 30) begin
        automatic int p = $urandom % (SECT_BYTES * 8);
        if (!errs[p / 8][p % 8]) begin errs[p / 8][p % 8] = 1; n++; end
      end
    end
    read_pass();
    check(page_fail, "30 errors flagged uncorrectable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
