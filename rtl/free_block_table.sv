// free_block_table: the partial free-block table used for wear levelling.
//
// The processor keeps, in the background, a short list of free blocks with the lowest
// program/erase counts. In hardware the list is a write-addressable FIFO: the processor writes
// a block number into any slot (wr_en, wr_addr, wr_block), which marks the slot valid. The
// controller takes blocks in slot order (alloc): the slot at the read pointer is handed out
// (alloc_block, alloc_valid), invalidated and the pointer moves on. When the slot at the read
// pointer is empty the table has run dry and the block is instead chosen round-robin over all
// NBLOCK blocks (alloc_rr = 1), skipping the reserved block range below RR_FIRST; the caller
// (or processor) must still check the choice against the full free table. The result is
// combinational; the pointer moves on the clock edge with alloc. level is the number of
// valid slots.
// The two-level scheme (partial low-P/E table as a write-addressable FIFO, round robin when
// it is empty) follows the cube's wear-levelling description; sizes are this design's.
module free_block_table
  import flash_pkg::*;
#(
  parameter int unsigned SLOTS    = 16,
  parameter int unsigned NBLOCK   = 1 << BLOCK_W,
  parameter int unsigned RR_FIRST = 8        // blocks reserved (tables, boot), never handed out
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      wr_en,
  input  logic [$clog2(SLOTS)-1:0]  wr_addr,
  input  logic [BLOCK_W-1:0]        wr_block,
  input  logic                      alloc,
  output logic [BLOCK_W-1:0]        alloc_block,
  output logic                      alloc_rr,
  output logic [$clog2(SLOTS):0]    level
);

  logic [BLOCK_W-1:0]       blk   [SLOTS];
  logic [SLOTS-1:0]         valid;
  logic [$clog2(SLOTS)-1:0] rp;
  logic [BLOCK_W-1:0]       rr;

  always_comb begin
    alloc_rr    = !valid[rp];
    alloc_block = alloc_rr ? rr : blk[rp];
    level       = '0;
    for (int i = 0; i < SLOTS; i++) level += ($clog2(SLOTS)+1)'(valid[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
      rp    <= '0;
      rr    <= BLOCK_W'(RR_FIRST);
    end else begin
      if (alloc) begin
        if (!alloc_rr) begin
          valid[rp] <= 1'b0;
          rp        <= rp + 1'b1;
        end else begin
          rr <= (32'(rr) == NBLOCK - 1) ? BLOCK_W'(RR_FIRST) : rr + 1'b1;
        end
      end
      if (wr_en) valid[wr_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) if (wr_en) blk[wr_addr] <= wr_block;

endmodule
