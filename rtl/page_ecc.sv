// page_ecc: the BCH protection of one die's page.
//
// A 16384-byte page is covered by 32 independent BCH[4382,4096] codewords, one per 512-byte
// sector; their 36-byte parity fields are kept in the die's spare area, sector s at spare
// bytes 36*s .. 36*s+35 (1152 of the 1216 spare bytes).
// Program: every data byte written to the die also enters the encoder. When a sector's last
//   byte has gone in, its 286-bit parity is stored in the parity store (one word per sector).
//   After the data, par_byte supplies the parity bytes of sector sect, byte spk, for the
//   spare area.
// Read: every data byte read from the die is re-encoded in the same way, so after the data
//   phase the store holds the parity of the data as read. Each spare byte read back is XORed
//   with the recomputed parity; the 36 difference bytes are the remainder of the received
//   codeword and have the same syndromes, so they go to the decoder, which then reports the
//   error locations of the whole sector (data and parity) one byte per cycle as page columns
//   (corr_col, corr_mask). done pulses per sector; max_err holds the largest number of bits
//   corrected in any sector of the page and page_fail that some sector had more than t errors.
// Encoding on write and checking by re-encoding on read follow the controller's description;
// the layout of the parity in the spare area and the correction report are this design's.
module page_ecc
  import flash_pkg::*;
#(
  parameter int unsigned NSECT = SECTORS
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          page_begin,   // new page operation
  input  logic                          data_stb,     // a data byte (write or read)
  input  logic [7:0]                    data_in,
  input  logic [$clog2(NSECT)-1:0]      sect,
  input  logic [$clog2(SECT_BYTES)-1:0] sbyte,
  input  logic [$clog2(PAR_BYTES)-1:0]  spk,
  output logic [7:0]                    par_byte,     // parity byte for the spare area
  input  logic                          spare_stb,    // a spare byte read back
  input  logic [7:0]                    spare_in,
  output logic                          corr_valid,
  output logic [COL_W-1:0]              corr_col,
  output logic [7:0]                    corr_mask,
  output logic                          done,
  output logic [$clog2(BCH_T+1):0]      err_count,
  output logic [$clog2(BCH_T+1):0]      max_err,
  output logic                          page_fail
);

  localparam int unsigned SW = $clog2(NSECT);
  localparam int unsigned EW = $clog2(BCH_T + 1) + 1;

  // ---------------- encoder and parity store ----------------
  logic [BCH_P-1:0] enc_parity;
  logic             st_pend;
  logic [SW-1:0]    st_sect;
  logic [BCH_P-1:0] par_mem [NSECT];

  bch_encoder #(.EMIT_PARITY(1'b0)) u_enc (
    .clk, .rst,
    .start    (data_stb && sbyte == '0),
    .in_valid (data_stb),
    .in_data  (data_in),
    .ready    (),
    .out_valid(), .out_data(), .out_ready(1'b1),
    .first(), .last(), .is_data(), .is_ecc(),
    .parity   (enc_parity)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st_pend <= 1'b0;
      st_sect <= '0;
    end else begin
      st_pend <= data_stb && sbyte == ($clog2(SECT_BYTES))'(SECT_BYTES - 1);
      st_sect <= sect;
    end
  end

  always_ff @(posedge clk) begin
    if (st_pend) par_mem[st_sect] <= enc_parity;
  end

  logic [PAR_BYTES*8-1:0] par_padded;
  assign par_padded = {par_mem[sect], {PAR_PAD{1'b0}}};
  assign par_byte   = par_padded[PAR_BYTES*8-1 - 8*spk -: 8];

  // ---------------- decoder on the parity difference ----------------
  logic                       dec_valid;
  logic [$clog2(CW_BYTES)-1:0] dec_idx;
  logic [7:0]                 dec_mask;
  logic                       dec_fail, dec_done;
  logic [EW-1:0]              dec_cnt;

  bch_decoder u_dec (
    .clk, .rst,
    .start    (spare_stb && spk == '0),
    .in_valid (spare_stb),
    .in_data  (spare_in ^ par_byte),
    .in_last  (spare_stb && spk == ($clog2(PAR_BYTES))'(PAR_BYTES - 1)),
    .ready    (),
    .out_valid(dec_valid),
    .out_idx  (dec_idx),
    .out_mask (dec_mask),
    .done     (dec_done),
    .err_count(dec_cnt),
    .errors_present(),
    .fail     (dec_fail)
  );

  always_comb begin
    corr_valid = dec_valid && dec_mask != '0;
    corr_mask  = dec_mask;
    if (32'(dec_idx) < SECT_BYTES)
      corr_col = COL_W'(32'(sect) * SECT_BYTES + 32'(dec_idx));
    else
      corr_col = COL_W'(NSECT * SECT_BYTES + 32'(sect) * PAR_BYTES + 32'(dec_idx) - SECT_BYTES);
  end

  assign done      = dec_done;
  assign err_count = dec_cnt;

  always_ff @(posedge clk) begin
    if (rst || page_begin) begin
      max_err   <= '0;
      page_fail <= 1'b0;
    end else if (dec_done) begin
      if (dec_fail) page_fail <= 1'b1;
      else if (dec_cnt > max_err) max_err <= dec_cnt;
    end
  end

endmodule
