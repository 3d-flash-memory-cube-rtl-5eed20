// tb_flash_cube: end-to-end test of the cube controller with 24 die models.
//
// The page is shortened to 2 sectors and the logical address to 16 bits for run time (the
// full-size test is tb_flash_cube_full). The processor side first clears the table entries
// in use and puts two free blocks in the free-block table. Then: reset; erase and read of a
// unit that was never written (unmapped); first program of a unit (maps a free block; the
// dies must hold the page at that block); read with bit errors in three dies, one of them
// above the error threshold (the corrected page must equal the written one; a READ_ERR entry
// and a scrub request must follow); a program that one die fails (prog_retry, the old block
// goes to the garbage-collection queue and a WRITE_FAIL entry to the bad-block queue, the
// unit is remapped, here to a round-robin block because the table has run empty), the retry;
// an erase of a mapped unit; and a redundant-module vote with one module disagreeing.
// Every mechanism is counted while it happens and a count of zero is a failure.
module tb_flash_cube;
  import flash_pkg::*;

  localparam int ND = NDIE, NS = 2, LW = 16;
  localparam int PB = NS * SECT_BYTES;
  localparam int EW = $clog2(BCH_T + 1) + 1;

  logic CLK = 0, rst = 1;
  logic [ND*8-1:0] DIO_o, DIO_i, data_to_be_written, rd_data, status, corr_mask;
  logic [ND*8-1:0] nmr_d0, nmr_d1, nmr_d2, nmr_q;
  logic DIO_oe, CLE, ALE, WE_n, RE_n, CE_n, WP_n, R_nB;
  cmd_e cmd_code;
  logic cmd_start, host_busy, host_done, prog_retry, unmapped, wr_valid, wr_ack, rd_valid;
  logic corr_valid, fbt_wr_en, ftl_up_en, bb_irq, bb_pop, bb_overflow, gc_irq, gc_pop;
  logic scrub_req, scrub_relocate, nmr_in_valid, nmr_out_valid, nmr_uncertain;
  logic [LW-1:0] lsa;
  logic [PAGE_W-1:0] page_value;
  logic [COL_W-1:0] col_value, corr_col;
  logic [BLOCK_W-1:0] phys_block, fbt_wr_block, gc_block, scrub_block;
  logic [ND-1:0] stat_fail, rnb;
  logic [3:0] fbt_wr_addr;
  logic [4:0] fbt_level;
  logic [LW-5:0] ftl_up_index;
  logic [31:0] ftl_up_entry;
  logic [17:0] bb_entry;
  logic [EW-1:0] err_thr;
  logic [15:0] pe_count, pe_limit;
  logic [2:0] nmr_disagree;
  int checks = 0, failures = 0;

  always #5 CLK = ~CLK;

  flash_cube #(.NSECT(NS), .LSA_W(LW)) dut (.*);

  for (genvar i = 0; i < ND; i++) begin : g_die
    nand_die_model #(.ID3(8'(i))) u_die (
      .IO_i(DIO_o[8*i +: 8]), .IO_o(DIO_i[8*i +: 8]),
      .CLE, .ALE, .WE_n, .RE_n, .CE_n, .WP_n, .R_nB(rnb[i])
    );
  end
  assign R_nB = &rnb;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1_500_000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_map = 0, n_unmapped = 0, n_corr = 0, n_scrub = 0, n_bb = 0, n_gc = 0, n_retry = 0;
  int n_rr = 0, n_nmr = 0, n_done = 0;
  always @(negedge CLK) begin   // sampled between edges: no race with the design
    if (dut.map_en) n_map++;
    if (host_done && unmapped) n_unmapped++;
    if (corr_valid) n_corr++;
    if (scrub_req) n_scrub++;
    if (dut.u_bbf.push) n_bb++;
    if (dut.gc_push) n_gc++;
    if (host_done && prog_retry) n_retry++;
    if (dut.fb_alloc && dut.fb_rr) n_rr++;
    if (nmr_out_valid && nmr_disagree != 0) n_nmr++;
    if (host_done) n_done++;
  end

  byte unsigned wdata [ND][PB];
  int wr_idx;
  always_comb
    for (int i = 0; i < ND; i++) data_to_be_written[8*i +: 8] = wdata[i][wr_idx < PB ? wr_idx : 0];
  always @(posedge CLK) if (wr_ack) wr_idx <= wr_idx + 1;

  byte unsigned rpage [ND][PB];
  int rd_idx;
  always @(posedge CLK) begin
    if (rd_valid) begin
      for (int i = 0; i < ND; i++) if (rd_idx < PB) rpage[i][rd_idx] = rd_data[8*i +: 8];
      rd_idx <= rd_idx + 1;
    end
    if (corr_valid)
      for (int i = 0; i < ND; i++) if (corr_col < PB) rpage[i][corr_col] ^= corr_mask[8*i +: 8];
  end

  task automatic host_cmd(cmd_e c, int unit, int pg);
    @(posedge CLK);
    cmd_code <= c; lsa <= LW'(unit * 16); page_value <= PAGE_W'(pg); col_value <= '0;
    cmd_start <= 1;
    @(posedge CLK);
    cmd_start <= 0;
    while (!host_done) @(posedge CLK);
  endtask

  initial begin
    automatic int row, blk_a, blk_b;
    automatic bit ok;
    cmd_start = 0; cmd_code = CMD_RESET; lsa = 0; page_value = 0; col_value = 0;
    wr_valid = 0; wr_idx = 0; rd_idx = 0;
    fbt_wr_en = 0; fbt_wr_addr = 0; fbt_wr_block = 0; ftl_up_en = 0; ftl_up_index = 0;
    ftl_up_entry = 0; bb_pop = 0; gc_pop = 0; err_thr = 8; pe_count = 100; pe_limit = 3000;
    nmr_in_valid = 0; nmr_d0 = 0; nmr_d1 = 0; nmr_d2 = 0;
    repeat (4) @(posedge CLK);
    rst <= 0;
    @(posedge CLK);

    // processor: clear the table entries of units 0..7, two free blocks
    for (int u = 0; u < 8; u++) begin
      ftl_up_en <= 1; ftl_up_index <= (LW-4)'(u); ftl_up_entry <= 32'h0;
      @(posedge CLK);
    end
    ftl_up_en <= 0;
    fbt_wr_en <= 1; fbt_wr_addr <= 0; fbt_wr_block <= 11'd100;
    @(posedge CLK);
    fbt_wr_addr <= 1; fbt_wr_block <= 11'd101;
    @(posedge CLK);
    fbt_wr_en <= 0;
    @(posedge CLK);
    check(fbt_level == 2, "free table level");

    host_cmd(CMD_RESET, 0, 0);
    check(g_die[11].u_die.n_reset == 1, "reset reaches the dies");

    // unmapped unit
    host_cmd(CMD_ERASE, 3, 0);
    check(unmapped && g_die[0].u_die.n_erase == 0, "erase of an unmapped unit is refused");
    host_cmd(CMD_READ_PAGE, 3, 0);
    check(unmapped && g_die[0].u_die.n_read == 0, "read of an unmapped unit is refused");

    // first program of unit 1 maps block 100
    for (int i = 0; i < ND; i++) for (int j = 0; j < PB; j++) wdata[i][j] = 8'($urandom);
    wr_idx = 0;
    wr_valid <= 1;
    host_cmd(CMD_PROG_PAGE, 1, 7);
    wr_valid <= 0;
    blk_a = phys_block;
    check(blk_a == 100 && !prog_retry && !unmapped, $sformatf("unit 1 mapped to %0d", blk_a));
    row = blk_a * 256 + 7;
    ok = 1;
    for (int i = 0; i < ND; i += 5)
      for (int j = 0; j < PB; j += 3) begin
        automatic byte unsigned v;
        case (i)
          0: v = g_die[0].u_die.peek(row, j);
          5: v = g_die[5].u_die.peek(row, j);
          10: v = g_die[10].u_die.peek(row, j);
          15: v = g_die[15].u_die.peek(row, j);
          default: v = g_die[20].u_die.peek(row, j);
        endcase
        if (v != wdata[i][j]) ok = 0;
      end
    check(ok, "page stored at the mapped block");

    // read back with errors: die 3 has 12 (above the threshold), die 9 has 2, die 20 has 1
    for (int e = 0; e < 12; e++) g_die[3].u_die.flip_bit(row, e * 37 + 5, e % 8);
    g_die[9].u_die.flip_bit(row, 600, 1);
    g_die[9].u_die.flip_bit(row, PB + PAR_BYTES + 2, 4);
    g_die[20].u_die.flip_bit(row, 1000, 6);
    rd_idx = 0;
    host_cmd(CMD_READ_PAGE, 1, 7);
    ok = 1;
    for (int i = 0; i < ND; i++) for (int j = 0; j < PB; j++) if (rpage[i][j] != wdata[i][j]) ok = 0;
    check(ok, "read page corrected");
    check(bb_irq && bb_entry == {2'd2, 5'd3, 11'(blk_a)}, $sformatf("READ_ERR entry %h", bb_entry));
    @(posedge CLK); bb_pop <= 1; @(posedge CLK); bb_pop <= 0; @(posedge CLK);
    check(!bb_irq, "only die 3 reported");
    check(n_scrub == 1, "scrub request after the read");

    // program of unit 2 that die 6 fails
    g_die[6].u_die.fail_next_prog = 1;
    wr_idx = 0;
    wr_valid <= 1;
    host_cmd(CMD_PROG_PAGE, 2, 0);
    wr_valid <= 0;
    blk_b = phys_block;
    check(prog_retry && stat_fail == ND'(1) << 6, "program failure reported for retry");
    check(gc_irq && gc_block == 11'd101, $sformatf("old block %0d queued for collection", gc_block));
    check(bb_irq && bb_entry == {2'd1, 5'd6, 11'd101}, $sformatf("WRITE_FAIL entry %h", bb_entry));
    check(blk_b == 8, $sformatf("relocated to round-robin block %0d", blk_b));
    @(posedge CLK); bb_pop <= 1; gc_pop <= 1; @(posedge CLK); bb_pop <= 0; gc_pop <= 0;
    wr_idx = 0;
    wr_valid <= 1;
    host_cmd(CMD_PROG_PAGE, 2, 0);
    wr_valid <= 0;
    check(!prog_retry && phys_block == 11'(blk_b) && g_die[6].u_die.peek(blk_b * 256, 10) == wdata[6][10],
          "retry written to the new block");

    // erase of a mapped unit
    host_cmd(CMD_ERASE, 1, 0);
    check(!unmapped && g_die[2].u_die.n_erase == 1 && g_die[2].u_die.peek(row, 0) == 8'hFF,
          "erase of unit 1");

    // redundant-module vote
    @(posedge CLK);
    nmr_d0 <= {6{32'hA5A5_0F0F}}; nmr_d1 <= {6{32'hA5A5_0F0F}} ^ 192'h8000; nmr_d2 <= {6{32'hA5A5_0F0F}};
    nmr_in_valid <= 1;
    @(posedge CLK);
    nmr_in_valid <= 0;
    @(posedge CLK);
    check(nmr_q == {6{32'hA5A5_0F0F}} && nmr_disagree == 3'b010, "vote masks module 1");

    check(n_map >= 2,      "mechanism: first-write mapping and remapping");
    check(n_unmapped == 2, "mechanism: unmapped unit");
    check(n_corr >= 15,    "mechanism: ECC correction");
    check(n_scrub >= 1,    "mechanism: scrub request");
    check(n_bb >= 2,       "mechanism: bad-block entries");
    check(n_gc >= 1,       "mechanism: garbage-collection queue");
    check(n_retry >= 1,    "mechanism: program retry");
    check(n_rr >= 1,       "mechanism: round-robin allocation");
    check(n_nmr >= 1,      "mechanism: redundant-module vote");
    check(n_done == 8,     $sformatf("host commands completed %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
