// tb_flash_ctrl: self-checking test of the 24-die NAND controller against 24 die models.
//
// Sequence: reset, read ID (each die answers its own ID byte), block erase, page program with
// random data, a check of what each die stored (data bytes and, for two dies, the spare
// parity against the reference encoder), bit errors injected into the stored pages of several
// dies (up to t = 22 in one sector, some in the parity field), page read with the reported
// corrections applied (the corrected page must equal the written one), a program that one die
// fails (stat_fail), and read status. Bus cycle counts of program and read are checked.
// The page is shortened to 4 sectors to keep the run short; the top-level full-size test
// uses the whole 32-sector page.
module tb_flash_ctrl;
  import flash_pkg::*;
  import bch_ref_pkg::*;

  localparam int ND    = NDIE;
  localparam int NS    = 4;         // sectors per page (32 in the cube), reduced for run time
  localparam int PB    = NS * SECT_BYTES;
  localparam int EW    = $clog2(BCH_T + 1) + 1;

  logic CLK = 0, rst = 1;
  logic [ND*8-1:0] DIO_o, DIO_i, data_to_be_written, rd_data, status, corr_mask;
  logic DIO_oe, CLE, ALE, WE_n, RE_n, CE_n, WP_n, R_nB;
  cmd_e cmd_code;
  logic cmd_start, cmd_done, busy, wr_valid, wr_ack, rd_valid, corr_valid, ecc_sector_done;
  logic [BLOCK_W-1:0] block_value;
  logic [PAGE_W-1:0]  page_value;
  logic [COL_W-1:0]   col_value;
  logic [ND-1:0]      stat_fail, ecc_fail, rnb;
  logic [COL_W-1:0]   corr_col;
  logic [ND*EW-1:0]   ecc_max_err;
  int checks = 0, failures = 0;

  always #5 CLK = ~CLK;

  flash_ctrl #(.NSECT(NS)) dut (.*);

  for (genvar i = 0; i < ND; i++) begin : g_die
    nand_die_model #(.ID3(8'(i))) u_die (
      .IO_i(DIO_o[8*i +: 8]), .IO_o(DIO_i[8*i +: 8]),
      .CLE, .ALE, .WE_n, .RE_n, .CE_n, .WP_n, .R_nB(rnb[i])
    );
  end
  assign R_nB = &rnb;     // open-drain ready/busy, wired-AND

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_we = 0, n_re = 0;
  always @(posedge WE_n) n_we++;
  always @(posedge RE_n) n_re++;

  // host data for the program
  byte unsigned wdata [ND][PB];
  int wr_idx;
  always_comb
    for (int i = 0; i < ND; i++) data_to_be_written[8*i +: 8] = wdata[i][wr_idx < PB ? wr_idx : 0];
  always @(posedge CLK) if (wr_ack) wr_idx <= wr_idx + 1;

  // read collection
  byte unsigned rpage [ND][PB + NS * PAR_BYTES];
  int rd_idx;
  byte unsigned rd_bytes[$];
  always @(posedge CLK) begin
    if (rd_valid) begin
      for (int i = 0; i < ND; i++) begin
        if (rd_idx < PB) rpage[i][rd_idx] = rd_data[8*i +: 8];
      end
      rd_bytes.push_back(rd_data[7:0]);
      rd_idx <= rd_idx + 1;
    end
    if (corr_valid)
      for (int i = 0; i < ND; i++) rpage[i][corr_col] ^= corr_mask[8*i +: 8];
  end

  task automatic run_cmd(cmd_e c, int blk, int pg);
    @(posedge CLK);
    cmd_code <= c; block_value <= BLOCK_W'(blk); page_value <= PAGE_W'(pg); col_value <= '0;
    cmd_start <= 1;
    @(posedge CLK);
    cmd_start <= 0;
    while (!cmd_done) @(posedge CLK);
  endtask

  initial begin
    automatic int we0, re0, row;
    automatic bit ok;
    cmd_start = 0; cmd_code = CMD_RESET; block_value = 0; page_value = 0; col_value = 0;
    wr_valid = 0; wr_idx = 0; rd_idx = 0;
    build();
    repeat (4) @(posedge CLK);
    rst <= 0;

    // reset
    run_cmd(CMD_RESET, 0, 0);
    check(g_die[0].u_die.n_reset == 1 && g_die[23].u_die.n_reset == 1, "reset reached dies");

    // read ID
    rd_bytes = {};
    rd_idx <= 0;
    run_cmd(CMD_READ_ID, 0, 0);
    @(posedge CLK);
    check(rd_bytes.size() == 5 && rd_bytes[0] == 8'h2C, "read ID bytes of die 0");
    check(rd_data[8*17 +: 8] == 8'hA9, "ID last byte");

    // erase block 5
    run_cmd(CMD_ERASE, 5, 0);
    check(g_die[3].u_die.n_erase == 1 && stat_fail == '0, "erase passes");

    // program block 5 page 3
    for (int i = 0; i < ND; i++) for (int j = 0; j < PB; j++) wdata[i][j] = 8'($urandom);
    wr_idx = 0;
    wr_valid <= 1;
    we0 = n_we;
    run_cmd(CMD_PROG_PAGE, 5, 3);
    wr_valid <= 0;
    check(stat_fail == '0, "program status pass");
    check(n_we - we0 == 1 + 5 + PB + NS * PAR_BYTES + 1 + 1,
          $sformatf("program bus write cycles %0d", n_we - we0));
    row = 5 * 256 + 3;
    ok = 1;
    for (int i = 0; i < ND; i++)
      for (int j = 0; j < PB; j++) if (g_die[0].u_die.peek(row, j) != wdata[0][j] && i == 0) ok = 0;
    for (int j = 0; j < PB; j++) if (g_die[23].u_die.peek(row, j) != wdata[23][j]) ok = 0;
    check(ok, "stored page data");
    // spare parity of die 0 sector 0 and die 9 sector NS-1
    for (int t = 0; t < 2; t++) begin
      automatic int die = t ? 9 : 0;
      automatic int s = t ? NS - 1 : 0;
      automatic bit db[$] = {};
      automatic bit pb[$] = {};
      for (int j = 0; j < SECT_BYTES; j++)
        for (int b = 7; b >= 0; b--) db.push_back(wdata[die][s * SECT_BYTES + j][b]);
      ref_parity(db, pb);
      ok = 1;
      for (int b = 0; b < BCH_P; b++) begin
        automatic byte unsigned v;
        v = (die == 0) ? g_die[0].u_die.peek(row, PB + s * PAR_BYTES + b / 8)
                       : g_die[9].u_die.peek(row, PB + s * PAR_BYTES + b / 8);
        if (v[7 - b % 8] != pb[b]) ok = 0;
      end
      check(ok, $sformatf("spare parity die %0d sector %0d", die, s));
    end

    // inject errors: die 0 sector 0: 22 bits; die 5: 3 bits incl. parity; die 7: 1 bit
    begin
      automatic int used[int];
      for (int e = 0; e < BCH_T; e++) begin
        automatic int p;
        do p = $urandom % (SECT_BYTES * 8); while (used.exists(p));
        used[p] = 1;
        g_die[0].u_die.flip_bit(row, p / 8, p % 8);
      end
    end
    g_die[5].u_die.flip_bit(row, SECT_BYTES + 7, 2);
    g_die[5].u_die.flip_bit(row, PB + 1 * PAR_BYTES + 3, 6);
    g_die[5].u_die.flip_bit(row, PB - 1, 0);
    g_die[7].u_die.flip_bit(row, 100, 7);

    // read page
    rd_idx = 0;
    re0 = n_re;
    run_cmd(CMD_READ_PAGE, 5, 3);
    check(n_re - re0 == PB + NS * PAR_BYTES, $sformatf("read bus cycles %0d", n_re - re0));
    ok = 1;
    for (int i = 0; i < ND; i++) for (int j = 0; j < PB; j++) if (rpage[i][j] != wdata[i][j]) ok = 0;
    check(ok, "corrected page equals written page");
    check(ecc_max_err[0 +: EW] == BCH_T, $sformatf("die 0 max errors %0d", ecc_max_err[0 +: EW]));
    check(ecc_max_err[5*EW +: EW] == 2, "die 5 max errors");
    check(ecc_max_err[7*EW +: EW] == 1, "die 7 max errors");
    check(ecc_max_err[8*EW +: EW] == 0, "die 8 no errors");
    check(ecc_fail == '0, "no uncorrectable sector");

    // a program that die 4 fails
    g_die[4].u_die.fail_next_prog = 1;
    wr_idx = 0;
    wr_valid <= 1;
    run_cmd(CMD_PROG_PAGE, 5, 4);
    wr_valid <= 0;
    check(stat_fail == ND'(1) << 4, $sformatf("program failure on die 4: %h", stat_fail));

    // read status
    rd_bytes = {};
    run_cmd(CMD_READ_STAT, 0, 0);
    @(posedge CLK);
    check(rd_bytes.size() == 1 && rd_bytes[0][6] == 1'b1, "status ready bit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
