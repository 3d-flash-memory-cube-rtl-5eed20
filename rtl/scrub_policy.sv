// scrub_policy: the baseline scrubbing decision for a block that has just been read.
//
// After each page read the largest number of bits the ECC corrected (max_err) is compared with
// a programmable threshold. Below or at the threshold nothing happens. Above it the block is
// to be scrubbed: rewritten in place while its program/erase count (pe_count, from the
// wear-levelling metadata) is below pe_limit, relocated to a fresh block otherwise. An
// uncorrectable read (ecc_fail) always asks for relocation. The decision is registered and
// presented with req_valid one clock after rd_done, together with the block address.
// The rule (read errors against a threshold, then P/E count decides rewrite or relocate)
// follows the cube's description; the encoding and widths are this design's.
module scrub_policy
  import flash_pkg::*;
#(
  parameter int unsigned EW = $clog2(BCH_T + 1) + 1,
  parameter int unsigned PE_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                rd_done,
  input  logic [BLOCK_W-1:0]  block,
  input  logic [EW-1:0]       max_err,
  input  logic                ecc_fail,
  input  logic [PE_W-1:0]     pe_count,
  input  logic [EW-1:0]       err_thr,
  input  logic [PE_W-1:0]     pe_limit,
  output logic                req_valid,
  output logic                req_relocate,   // 0 = rewrite in place, 1 = relocate
  output logic [BLOCK_W-1:0]  req_block
);

  always_ff @(posedge clk) begin
    if (rst) begin
      req_valid    <= 1'b0;
      req_relocate <= 1'b0;
      req_block    <= '0;
    end else begin
      req_valid <= rd_done && (ecc_fail || max_err > err_thr);
      if (rd_done) begin
        req_relocate <= ecc_fail || (pe_count >= pe_limit);
        req_block    <= block;
      end
    end
  end

endmodule
