// bad_block_fifo: queue of potentially bad blocks for the processor, with an interrupt.
//
// Two hardware events enter it:
//   write failure   after a page program or erase, every die whose status reported FAIL
//                   (fail_vec) gives one entry with marker BB_WRITE_FAIL;
//   read errors     after a page read, every die whose largest corrected error count is above
//                   the programmable threshold err_thr gives an entry with marker
//                   BB_READ_ERR, and every die with an uncorrectable sector BB_READ_FAIL.
// An entry is {marker[1:0], die[4:0], block[10:0]}. Events of several dies are queued one
// entry per clock through a pending mask (busy is high meanwhile; a new event must wait for
// busy to fall). irq is high while the FIFO holds entries; the processor reads the head
// (entry) and pops it. Entries arriving when the FIFO is full are lost and set overflow.
// The FIFO of failing block addresses with a case marker and the interrupt follow the cube's
// bad-block management; the entry format, depth and serialisation are this design's.
module bad_block_fifo
  import flash_pkg::*;
#(
  parameter int unsigned N_DIE = NDIE,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned EW    = $clog2(BCH_T + 1) + 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  wr_event,
  input  logic                  rd_event,
  input  logic [BLOCK_W-1:0]    block,
  input  logic [N_DIE-1:0]      fail_vec,
  input  logic [N_DIE*EW-1:0]   max_err,
  input  logic [N_DIE-1:0]      ecc_fail,
  input  logic [EW-1:0]         err_thr,
  output logic                  busy,
  output logic                  irq,
  output logic [17:0]           entry,
  input  logic                  pop,
  output logic [$clog2(DEPTH):0] count,
  output logic                  overflow
);

  localparam logic [1:0] BB_WRITE_FAIL = 2'd1;
  localparam logic [1:0] BB_READ_ERR   = 2'd2;
  localparam logic [1:0] BB_READ_FAIL  = 2'd3;

  logic [N_DIE-1:0]   pend;
  logic [N_DIE-1:0]   pend_fail;    // read events: uncorrectable
  logic [1:0]         kind;         // marker of a write event or read error
  logic [BLOCK_W-1:0] blk_q;
  logic [4:0]         die_sel;
  logic               push, empty, full;
  logic [1:0]         marker;

  always_comb begin
    die_sel = '0;
    for (int i = N_DIE - 1; i >= 0; i--) if (pend[i]) die_sel = 5'(i);
    marker = (kind == BB_WRITE_FAIL) ? BB_WRITE_FAIL :
             (pend_fail[die_sel] ? BB_READ_FAIL : BB_READ_ERR);
  end

  assign push = |pend;
  assign busy = |pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= '0;
      pend_fail <= '0;
      kind      <= BB_WRITE_FAIL;
      blk_q     <= '0;
    end else if (!busy && wr_event) begin
      pend  <= fail_vec;
      kind  <= BB_WRITE_FAIL;
      blk_q <= block;
    end else if (!busy && rd_event) begin
      for (int i = 0; i < N_DIE; i++)
        pend[i] <= ecc_fail[i] || (max_err[EW*i +: EW] > err_thr);
      pend_fail <= ecc_fail;
      kind      <= BB_READ_ERR;
      blk_q     <= block;
    end else if (push) begin
      pend[die_sel] <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(18), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push, .din({marker, die_sel, blk_q}),
    .pop, .dout(entry),
    .empty, .full, .count, .overflow
  );

  assign irq = !empty;

  a_event_when_idle: assert property (@(posedge clk) disable iff (rst)
    (wr_event || rd_event) |-> !busy);

endmodule
