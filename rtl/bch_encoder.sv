// bch_encoder: systematic BCH[4382,4096] (t = 22) encoder, one byte per clock.
//
// The encoder divides the data polynomial, times x^286, by the generator g(x) with a 286-bit
// linear feedback shift register that is unrolled eight times, so it takes one data byte per
// cycle (the width of one die's I/O). Data bits enter most significant bit first; the first
// bit of the sector is the coefficient of x^4381 of the codeword.
//
// Stream interface (mirrors the encoder the cube's ECC block is described with):
//   start     pulse with (or before) the first byte of a sector: clears the remainder.
//   in_valid / in_data   data bytes; accepted while ready = 1 (the data phase).
//   out_valid / out_data the data bytes echoed one cycle later, then the 36 parity bytes.
//   first     marks the first output byte, last the final parity byte.
//   is_data / is_ecc     tell which of the two the current output byte is.
//   out_ready only throttles the parity bytes (data bytes are echoed unconditionally).
//   parity    the running remainder; after the 512th byte it is the 286-bit ECC word,
//             bit 285 being the coefficient of x^285.
// Parity bytes are sent high order first; the last byte carries 6 parity bits followed by two
// zero pad bits. The pad and byte-serial organisation are this design's choices.
// With EMIT_PARITY = 0 the encoder never leaves the data phase: the parity is read from the
// parity bus one cycle after the last data byte and the next sector may follow at once.
module bch_encoder
  import flash_pkg::*;
#(
  parameter int unsigned K_BYTES     = SECT_BYTES,  // data bytes per codeword
  parameter bit          EMIT_PARITY = 1'b1         // 0: only the parity bus is used
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              in_valid,
  input  logic [7:0]        in_data,
  output logic              ready,
  output logic              out_valid,
  output logic [7:0]        out_data,
  input  logic              out_ready,
  output logic              first,
  output logic              last,
  output logic              is_data,
  output logic              is_ecc,
  output logic [BCH_P-1:0]  parity
);

  localparam logic [BCH_P-1:0] G_LOW = BCH_GEN[BCH_P-1:0];
  localparam int unsigned CNT_W = $clog2(K_BYTES + PAR_BYTES + 1);

  typedef enum logic [0:0] {S_DATA, S_ECC} state_e;
  state_e              state;
  logic [BCH_P-1:0]    rem_q, rem_d;
  logic [CNT_W-1:0]    cnt;
  logic [PAR_BYTES*8-1:0] shreg;   // parity bytes still to be sent, left aligned
  logic                echo_valid, echo_first;
  logic [7:0]          echo_data;

  // Eight LFSR steps for one byte.
  function automatic logic [BCH_P-1:0] lfsr_byte(logic [BCH_P-1:0] r, logic [7:0] d);
    logic fb;
    for (int b = 7; b >= 0; b--) begin
      fb = d[b] ^ r[BCH_P-1];
      r  = {r[BCH_P-2:0], 1'b0} ^ (fb ? G_LOW : '0);
    end
    return r;
  endfunction

  wire accept  = (state == S_DATA) && in_valid;
  wire par_out = (state == S_ECC) && !echo_valid;      // a parity byte is presented
  wire par_adv = par_out && out_ready;
  wire [CNT_W-1:0] cnt_eff = start ? CNT_W'(0) : cnt;

  always_comb begin
    rem_d = start ? '0 : rem_q;
    if (accept) rem_d = lfsr_byte(rem_d, in_data);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_DATA;
      rem_q      <= '0;
      cnt        <= '0;
      shreg      <= '0;
      echo_valid <= 1'b0;
      echo_first <= 1'b0;
      echo_data  <= '0;
    end else begin
      rem_q      <= rem_d;
      echo_valid <= accept;
      echo_data  <= in_data;
      echo_first <= accept && (cnt_eff == 0);
      if (accept) begin
        cnt <= cnt_eff + 1'b1;
        if (cnt_eff == CNT_W'(K_BYTES - 1)) begin
          if (EMIT_PARITY) state <= S_ECC;
          shreg <= {rem_d, {PAR_PAD{1'b0}}};
          cnt   <= '0;
        end
      end else if (start) begin
        cnt <= '0;
      end
      if (par_adv) begin
        shreg <= {shreg[PAR_BYTES*8-9:0], 8'h00};
        cnt   <= cnt + 1'b1;
        if (cnt == CNT_W'(PAR_BYTES - 1)) begin
          state <= S_DATA;
          cnt   <= '0;
        end
      end
    end
  end

  always_comb begin
    out_valid = echo_valid || par_out;
    out_data  = echo_valid ? echo_data : shreg[PAR_BYTES*8-1 -: 8];
    first     = echo_valid && echo_first;
    is_data   = echo_valid;
    is_ecc    = par_out;
    last      = par_out && (cnt == CNT_W'(PAR_BYTES - 1));
  end

  assign ready  = (state == S_DATA);
  assign parity = rem_q;

endmodule
