// ftl_lbt: the logical block table of the flash translation layer.
//
// The table maps logical to physical addresses at a granularity of 16 sectors (8 kB): each
// entry is 4 bytes wide and holds the physical block number (low BLOCK_W bits) and a valid
// flag (bit 31). A logical sector address lsa is translated by using its upper bits,
// lsa[LSA_W-1:4], directly as the RAM address; the low four bits select the sector inside the
// mapped unit, which is laid out sequentially and passes through untranslated.
// Lookup: lk_req with lk_lsa; one clock later lk_ack with lk_block, lk_sector (= lsa[3:0]) and
// lk_valid (the entry has been written). Update: up_en writes up_entry at up_index (the
// processor, or the remapping after a failed write); a lookup of the index being written in
// the same cycle returns the old entry.
// The table is held in a RAM array of 2^(LSA_W-4) entries; the default LSA_W of 28 covers the
// cube's 768 Gb (96 GB = 1.5 * 2^26 sectors of 512 B fits in 2^28). Direct indexing by the
// upper sector-address bits and the 4-byte, 16-sector entries follow the cube's FTL
// description; the valid flag is this design's.
module ftl_lbt
  import flash_pkg::*;
#(
  parameter int unsigned LSA_W = 28
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    lk_req,
  input  logic [LSA_W-1:0]        lk_lsa,
  output logic                    lk_ack,
  output logic [BLOCK_W-1:0]      lk_block,
  output logic [3:0]              lk_sector,
  output logic                    lk_valid,
  input  logic                    up_en,
  input  logic [LSA_W-5:0]        up_index,
  input  logic [31:0]             up_entry
);

  logic [31:0] table_ram [2**(LSA_W-4)];
  logic [31:0] rd_q;
  logic [3:0]  off_q;

  always_ff @(posedge clk) begin
    if (lk_req) begin
      rd_q  <= table_ram[lk_lsa[LSA_W-1:4]];
      off_q <= lk_lsa[3:0];
    end
    if (up_en) table_ram[up_index] <= up_entry;
  end

  always_ff @(posedge clk) begin
    if (rst) lk_ack <= 1'b0;
    else     lk_ack <= lk_req;
  end

  assign lk_block  = rd_q[BLOCK_W-1:0];
  assign lk_valid  = rd_q[31];
  assign lk_sector = off_q;

endmodule
