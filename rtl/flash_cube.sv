// flash_cube: the memory controller of the 3D NAND Flash cube (hardware data path).
//
// Twenty-four 32Gb NAND dies are stacked and each is wired separately to this controller,
// which runs them in lockstep as one 192-bit-wide device. The top joins:
//   ftl_lbt           logical block table: a host logical sector address selects a physical
//                     erase block (4-byte entries, 16-sector units);
//   free_block_table  low-P/E free blocks, round robin when it runs dry;
//   flash_ctrl        the NAND controller with per-die BCH ECC;
//   bad_block_fifo    failing blocks (write status fail, read errors above a threshold,
//                     uncorrectable reads) queued for the processor, with an interrupt;
//   sync_fifo (GC)    blocks that were relocated and must be erased by the processor;
//   scrub_policy      rewrite/relocate request after a read with many corrected errors;
//   nmr_voter         the 2-of-3 vote used when modules of a daisy chain are redundant. Its
//                     inputs come from the chain interface, which is not part of this RTL, so
//                     its ports are brought out unchanged.
// Host command flow: cmd_start with cmd_code, lsa (logical sector address), page_value and
// col_value. The top looks up lsa in the table. A program to an unmapped unit first takes a
// block from the free-block table and records the mapping. The command then runs on the
// physical block. After a program whose status reports a failing die, the block is queued as
// potentially bad and for garbage collection, a new free block is taken and mapped, and
// prog_retry is raised with host_done: the host keeps its write buffer and sends the same
// page again. After a read the ECC results feed the bad-block FIFO and the scrub policy.
// host_done ends every command; unmapped is set with it for a read or erase of a unit that
// has no mapping (no flash access is made).
// The processor side (table writes, FIFO pops, thresholds, P/E count) is brought out as ports;
// the processor itself, the SRIO link and the MRAM are outside this RTL.
// The block set and their roles follow the cube's controller description; the command flow
// that ties them together is this design's.
module flash_cube
  import flash_pkg::*;
#(
  parameter int unsigned N_DIE    = NDIE,
  parameter int unsigned NSECT    = SECTORS,
  parameter int unsigned LSA_W    = 28,
  parameter int unsigned BB_DEPTH = 16,
  parameter int unsigned GC_DEPTH = 16,
  parameter int unsigned FB_SLOTS = 16,
  parameter int unsigned PE_W     = 16
) (
  input  logic                   CLK,
  input  logic                   rst,
  // NAND dies
  output logic [N_DIE*8-1:0]     DIO_o,
  output logic                   DIO_oe,
  input  logic [N_DIE*8-1:0]     DIO_i,
  output logic                   CLE,
  output logic                   ALE,
  output logic                   WE_n,
  output logic                   RE_n,
  output logic                   CE_n,
  output logic                   WP_n,
  input  logic                   R_nB,
  // host commands and data
  input  cmd_e                   cmd_code,
  input  logic                   cmd_start,
  input  logic [LSA_W-1:0]       lsa,
  input  logic [PAGE_W-1:0]      page_value,
  input  logic [COL_W-1:0]       col_value,
  output logic                   host_busy,
  output logic                   host_done,
  output logic                   prog_retry,
  output logic                   unmapped,
  output logic [BLOCK_W-1:0]     phys_block,
  input  logic [N_DIE*8-1:0]     data_to_be_written,
  input  logic                   wr_valid,
  output logic                   wr_ack,
  output logic [N_DIE*8-1:0]     rd_data,
  output logic                   rd_valid,
  output logic [N_DIE*8-1:0]     status,
  output logic [N_DIE-1:0]       stat_fail,
  output logic                   corr_valid,
  output logic [COL_W-1:0]       corr_col,
  output logic [N_DIE*8-1:0]     corr_mask,
  // processor side
  input  logic                   fbt_wr_en,
  input  logic [$clog2(FB_SLOTS)-1:0] fbt_wr_addr,
  input  logic [BLOCK_W-1:0]     fbt_wr_block,
  output logic [$clog2(FB_SLOTS):0] fbt_level,
  input  logic                   ftl_up_en,
  input  logic [LSA_W-5:0]       ftl_up_index,
  input  logic [31:0]            ftl_up_entry,
  output logic                   bb_irq,
  output logic [17:0]            bb_entry,
  input  logic                   bb_pop,
  output logic                   bb_overflow,
  output logic                   gc_irq,
  output logic [BLOCK_W-1:0]     gc_block,
  input  logic                   gc_pop,
  input  logic [$clog2(BCH_T+1):0] err_thr,
  input  logic [PE_W-1:0]        pe_count,
  input  logic [PE_W-1:0]        pe_limit,
  output logic                   scrub_req,
  output logic                   scrub_relocate,
  output logic [BLOCK_W-1:0]     scrub_block,
  // redundant-module vote
  input  logic                   nmr_in_valid,
  input  logic [N_DIE*8-1:0]     nmr_d0,
  input  logic [N_DIE*8-1:0]     nmr_d1,
  input  logic [N_DIE*8-1:0]     nmr_d2,
  output logic                   nmr_out_valid,
  output logic [N_DIE*8-1:0]     nmr_q,
  output logic [2:0]             nmr_disagree,
  output logic                   nmr_uncertain
);

  localparam int unsigned EW = $clog2(BCH_T + 1) + 1;

  typedef enum logic [2:0] {H_IDLE, H_LOOK, H_MAP, H_ISSUE, H_WAIT, H_POST, H_BBWAIT} hstate_e;
  hstate_e hstate;

  cmd_e               cmd_q;
  logic [LSA_W-1:0]   lsa_q;
  logic [BLOCK_W-1:0] blk_q;

  // ---------------- FTL ----------------
  logic               lk_req, lk_ack, lk_valid;
  logic [BLOCK_W-1:0] lk_block;
  logic [3:0]         lk_sector;
  logic               map_en;
  logic [31:0]        map_entry;

  ftl_lbt #(.LSA_W(LSA_W)) u_ftl (
    .clk(CLK), .rst,
    .lk_req, .lk_lsa(lsa), .lk_ack, .lk_block, .lk_sector, .lk_valid,
    .up_en   (ftl_up_en || map_en),
    .up_index(map_en ? lsa_q[LSA_W-1:4] : ftl_up_index),
    .up_entry(map_en ? map_entry : ftl_up_entry)
  );

  // ---------------- free blocks ----------------
  logic               fb_alloc, fb_rr;
  logic [BLOCK_W-1:0] fb_block;

  free_block_table #(.SLOTS(FB_SLOTS)) u_fbt (
    .clk(CLK), .rst,
    .wr_en(fbt_wr_en), .wr_addr(fbt_wr_addr), .wr_block(fbt_wr_block),
    .alloc(fb_alloc), .alloc_block(fb_block), .alloc_rr(fb_rr), .level(fbt_level)
  );

  // ---------------- NAND controller ----------------
  logic                 fc_start, fc_done, fc_busy, fc_sector_done;
  logic [N_DIE*EW-1:0]  max_err;
  logic [N_DIE-1:0]     ecc_fail;

  flash_ctrl #(.N_DIE(N_DIE), .NSECT(NSECT)) u_ctrl (
    .CLK, .rst,
    .DIO_o, .DIO_oe, .DIO_i, .CLE, .ALE, .WE_n, .RE_n, .CE_n, .WP_n, .R_nB,
    .cmd_code(cmd_q), .cmd_start(fc_start), .cmd_done(fc_done), .busy(fc_busy),
    .block_value(blk_q), .page_value, .col_value,
    .data_to_be_written, .wr_valid, .wr_ack, .rd_data, .rd_valid,
    .status, .stat_fail, .corr_valid, .corr_col, .corr_mask,
    .ecc_sector_done(fc_sector_done), .ecc_max_err(max_err), .ecc_fail
  );

  // ---------------- bad blocks, garbage collection, scrubbing ----------------
  logic wr_event, rd_event, bb_busy, gc_push, gc_empty;
  logic [EW-1:0] page_max;

  bad_block_fifo #(.N_DIE(N_DIE), .DEPTH(BB_DEPTH)) u_bbf (
    .clk(CLK), .rst,
    .wr_event, .rd_event, .block(blk_q),
    .fail_vec(stat_fail), .max_err, .ecc_fail, .err_thr,
    .busy(bb_busy), .irq(bb_irq), .entry(bb_entry), .pop(bb_pop),
    .count(), .overflow(bb_overflow)
  );

  sync_fifo #(.WIDTH(BLOCK_W), .DEPTH(GC_DEPTH)) u_gc (
    .clk(CLK), .rst,
    .push(gc_push), .din(blk_q), .pop(gc_pop), .dout(gc_block),
    .empty(gc_empty), .full(), .count(), .overflow()
  );
  assign gc_irq = !gc_empty;

  always_comb begin
    page_max = '0;
    for (int i = 0; i < N_DIE; i++)
      if (max_err[EW*i +: EW] > page_max) page_max = max_err[EW*i +: EW];
  end

  scrub_policy #(.PE_W(PE_W)) u_scrub (
    .clk(CLK), .rst,
    .rd_done(rd_event), .block(blk_q), .max_err(page_max), .ecc_fail(|ecc_fail),
    .pe_count, .err_thr, .pe_limit,
    .req_valid(scrub_req), .req_relocate(scrub_relocate), .req_block(scrub_block)
  );

  nmr_voter #(.W(N_DIE*8)) u_vote (
    .clk(CLK), .rst,
    .in_valid(nmr_in_valid), .d0(nmr_d0), .d1(nmr_d1), .d2(nmr_d2),
    .out_valid(nmr_out_valid), .q(nmr_q), .disagree(nmr_disagree), .uncertain(nmr_uncertain)
  );

  // ---------------- command flow ----------------
  wire needs_map = (cmd_q == CMD_READ_PAGE || cmd_q == CMD_PROG_PAGE || cmd_q == CMD_ERASE);

  always_ff @(posedge CLK) begin
    if (rst) begin
      hstate     <= H_IDLE;
      cmd_q      <= CMD_RESET;
      lsa_q      <= '0;
      blk_q      <= '0;
      host_done  <= 1'b0;
      prog_retry <= 1'b0;
      unmapped   <= 1'b0;
    end else begin
      host_done <= 1'b0;
      case (hstate)
        H_IDLE: if (cmd_start) begin
          cmd_q      <= cmd_code;
          lsa_q      <= lsa;
          prog_retry <= 1'b0;
          unmapped   <= 1'b0;
          hstate     <= H_LOOK;
        end
        H_LOOK: if (lk_ack) begin
          if (!needs_map) begin
            hstate <= H_ISSUE;
          end else if (lk_valid) begin
            blk_q  <= lk_block;
            hstate <= H_ISSUE;
          end else if (cmd_q == CMD_PROG_PAGE) begin
            blk_q  <= fb_block;        // first write of this unit: map a free block
            hstate <= H_ISSUE;
          end else begin
            unmapped  <= 1'b1;
            host_done <= 1'b1;
            hstate    <= H_IDLE;
          end
        end
        H_ISSUE: hstate <= H_WAIT;
        H_WAIT: if (fc_done) hstate <= H_POST;
        H_POST: begin
          if (cmd_q == CMD_PROG_PAGE && stat_fail != '0) begin
            blk_q      <= fb_block;    // relocate to a fresh block
            prog_retry <= 1'b1;
          end
          hstate <= H_BBWAIT;
        end
        H_BBWAIT: if (!bb_busy) begin
          host_done <= 1'b1;
          hstate    <= H_IDLE;
        end
        default: hstate <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    lk_req   = (hstate == H_IDLE) && cmd_start;
    fc_start = (hstate == H_ISSUE);
    // new mapping: first program of a unit, or relocation after a failed program
    map_en   = ((hstate == H_LOOK) && lk_ack && needs_map && !lk_valid && cmd_q == CMD_PROG_PAGE) ||
               ((hstate == H_POST) && cmd_q == CMD_PROG_PAGE && stat_fail != '0);
    map_entry = {1'b1, 20'd0, fb_block};
    fb_alloc = map_en;
    gc_push  = (hstate == H_POST) && cmd_q == CMD_PROG_PAGE && stat_fail != '0;
    wr_event = (hstate == H_POST) && (cmd_q == CMD_PROG_PAGE || cmd_q == CMD_ERASE) &&
               stat_fail != '0;
    rd_event = (hstate == H_POST) && cmd_q == CMD_READ_PAGE;
    host_busy  = (hstate != H_IDLE);
    phys_block = blk_q;
  end

endmodule
