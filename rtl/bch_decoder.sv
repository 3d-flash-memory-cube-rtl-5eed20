// bch_decoder: BCH[4382,4096] (t = 22) decoder, one byte per clock in and out.
//
// Three phases run one after the other:
//  1. Syndromes. While codeword bytes arrive, 2t = 44 syndromes S_j = r(alpha^j) are
//     accumulated by Horner's rule, eight bits per cycle. Leading all-zero bytes change no
//     syndrome, so a caller that only holds the difference between stored and recomputed
//     parity may send just those 36 bytes (that is how the page ECC uses it).
//  2. Error locator. An inversionless Berlekamp-Massey iteration runs 2t cycles, one
//     iteration per cycle, and leaves Lambda(x) (scaled) and its degree L.
//  3. Chien search. Lambda is evaluated at alpha^-e for every codeword bit position e, eight
//     positions per cycle, in the same byte order the codeword arrived in. Each cycle emits the
//     byte index and an 8-bit mask of the bits to flip.
// When the search ends, done pulses with err_count (= L), errors_present (some syndrome was
// non-zero) and fail (the number of roots found differs from L: more than t errors).
//
// Interface: start with the first byte; in_valid/in_data; in_last with the final parity byte,
// of which only the upper 8 - PAR_PAD bits belong to the code. ready is high while bytes are
// accepted. done is set 2t + CW_BYTES + 2 clock edges (594 at t = 22) after the edge that
// accepts in_last.
// The syndrome/BM/Chien structure is the standard BCH decoder the ECC block is described as
// using; the particular serial organisation and the mask output are this design's choices.
module bch_decoder
  import flash_pkg::*;
#(
  parameter int unsigned T        = BCH_T,      // correctable bits
  parameter int unsigned N_BITS   = BCH_N,      // codeword length in bits
  parameter int unsigned NBYTES   = CW_BYTES    // codeword length in bytes
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic                        in_valid,
  input  logic [7:0]                  in_data,
  input  logic                        in_last,
  output logic                        ready,
  output logic                        out_valid,
  output logic [$clog2(NBYTES)-1:0]   out_idx,
  output logic [7:0]                  out_mask,
  output logic                        done,
  output logic [$clog2(T+1):0]        err_count,
  output logic                        errors_present,
  output logic                        fail
);

  localparam int unsigned NS    = 2 * T;
  localparam int unsigned IDX_W = $clog2(NBYTES);
  localparam int unsigned LAST_BITS = 8 - (NBYTES * 8 - N_BITS);  // code bits in last byte
  localparam int unsigned LW    = $clog2(T + 1) + 1;

  // alpha^j for the syndromes, alpha^(i*b) and alpha^(8i) for the Chien search, and the
  // Chien start values alpha^(-i*(N_BITS-1)).
  function automatic logic [NS*GF_M-1:0] mk_syn_tbl();
    logic [NS*GF_M-1:0] t;
    for (int j = 1; j <= NS; j++) t[(j-1)*GF_M +: GF_M] = gf_alpha_pow(j);
    return t;
  endfunction
  function automatic logic [(T+1)*9*GF_M-1:0] mk_chien_tbl();
    logic [(T+1)*9*GF_M-1:0] t;
    for (int i = 0; i <= T; i++) begin
      for (int b = 0; b < 8; b++) t[(i*9+b)*GF_M +: GF_M] = gf_alpha_pow(i * b);
      t[(i*9+8)*GF_M +: GF_M] = gf_alpha_pow(8 * i);
    end
    return t;
  endfunction
  function automatic logic [(T+1)*GF_M-1:0] mk_init_tbl();
    logic [(T+1)*GF_M-1:0] t;
    for (int i = 0; i <= T; i++)
      t[i*GF_M +: GF_M] = gf_alpha_pow((GF_N - ((i * (N_BITS - 1)) % GF_N)) % GF_N);
    return t;
  endfunction

  localparam logic [NS*GF_M-1:0]        SYN_TBL   = mk_syn_tbl();
  localparam logic [(T+1)*9*GF_M-1:0]   CHIEN_TBL = mk_chien_tbl();
  localparam logic [(T+1)*GF_M-1:0]     INIT_TBL  = mk_init_tbl();

  typedef enum logic [2:0] {S_SYN, S_BM, S_CHINIT, S_CHIEN, S_DONE} state_e;
  state_e state;

  gf_t syn   [1:NS];
  gf_t lam   [0:T];
  gf_t bpoly [0:T];
  gf_t gamma;
  logic [LW-1:0]        L;
  logic [$clog2(NS):0]  r;
  logic [IDX_W-1:0]     cidx;
  logic [LW:0]          roots;
  logic                 any_syn;

  // ---------------- syndrome accumulation ----------------
  // (one small combinational block per syndrome keeps each block's loop unrolling short)
  gf_t syn_next [1:NS];
  for (genvar j = 1; j <= NS; j++) begin : g_syn
    always_comb begin
      syn_next[j] = start ? '0 : syn[j];
      for (int b = 7; b >= 0; b--) begin
        if (!(in_last && (7 - b) >= LAST_BITS))
          syn_next[j] = gf_mul(syn_next[j], SYN_TBL[(j-1)*GF_M +: GF_M]) ^ gf_t'(in_data[b]);
      end
    end
  end

  // ---------------- one Berlekamp-Massey iteration ----------------
  gf_t delta;
  gf_t lam_next [0:T];
  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++) begin
      if (int'(r) + 1 - i >= 1 && int'(r) + 1 - i <= NS)
        delta ^= gf_mul(lam[i], syn[int'(r) + 1 - i]);
    end
    for (int i = 0; i <= T; i++)
      lam_next[i] = gf_mul(gamma, lam[i]) ^ ((i > 0) ? gf_mul(delta, bpoly[i-1]) : '0);
  end

  // ---------------- Chien evaluation of eight positions ----------------
  logic [7:0] root_bits;
  for (genvar b = 0; b < 8; b++) begin : g_chien
    gf_t acc;
    always_comb begin
      acc = '0;
      for (int i = 0; i <= T; i++)
        acc ^= gf_mul(lam[i], CHIEN_TBL[(i*9+b)*GF_M +: GF_M]);
      root_bits[7 - b] = (acc == '0) && ((32'(cidx) * 8 + b) < N_BITS);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_SYN;
      r              <= '0;
      L              <= '0;
      gamma          <= gf_t'(1);
      cidx           <= '0;
      roots          <= '0;
      out_valid      <= 1'b0;
      out_idx        <= '0;
      out_mask       <= '0;
      done           <= 1'b0;
      err_count      <= '0;
      errors_present <= 1'b0;
      fail           <= 1'b0;
      any_syn        <= 1'b0;
      for (int j = 1; j <= NS; j++) syn[j] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i]   <= '0;
        bpoly[i] <= '0;
      end
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      case (state)
        S_SYN: begin
          if (start && !in_valid)
            for (int j = 1; j <= NS; j++) syn[j] <= '0;
          if (in_valid) begin
            for (int j = 1; j <= NS; j++) syn[j] <= syn_next[j];
            if (in_last) begin
              state <= S_BM;
              r     <= '0;
              L     <= '0;
              gamma <= gf_t'(1);
              for (int i = 0; i <= T; i++) begin
                lam[i]   <= (i == 0) ? gf_t'(1) : '0;
                bpoly[i] <= (i == 0) ? gf_t'(1) : '0;
              end
            end
          end
        end
        S_BM: begin
          for (int i = 0; i <= T; i++) lam[i] <= lam_next[i];
          if (delta != '0 && 2 * int'(L) <= int'(r)) begin
            for (int i = 0; i <= T; i++) bpoly[i] <= lam[i];
            L     <= LW'(int'(r) + 1 - int'(L));
            gamma <= delta;
          end else begin
            bpoly[0] <= '0;
            for (int i = 1; i <= T; i++) bpoly[i] <= bpoly[i-1];
          end
          if (r == ($clog2(NS)+1)'(NS - 1)) state <= S_CHINIT;
          r <= r + 1'b1;
          if (r == '0) begin
            any_syn <= 1'b0;
            for (int j = 1; j <= NS; j++) if (syn[j] != '0) any_syn <= 1'b1;
          end
        end
        S_CHINIT: begin
          for (int i = 0; i <= T; i++) lam[i] <= gf_mul(lam[i], INIT_TBL[i*GF_M +: GF_M]);
          cidx  <= '0;
          roots <= '0;
          state <= S_CHIEN;
        end
        S_CHIEN: begin
          for (int i = 0; i <= T; i++) lam[i] <= gf_mul(lam[i], CHIEN_TBL[(i*9+8)*GF_M +: GF_M]);
          out_valid <= 1'b1;
          out_idx   <= cidx;
          out_mask  <= root_bits;
          roots     <= roots + (LW+1)'($countones(root_bits));
          cidx      <= cidx + 1'b1;
          if (cidx == IDX_W'(NBYTES - 1)) state <= S_DONE;
        end
        S_DONE: begin
          done           <= 1'b1;
          err_count      <= (LW)'(L);
          errors_present <= any_syn;
          fail           <= (roots != (LW+1)'(L));
          state          <= S_SYN;
          for (int j = 1; j <= NS; j++) syn[j] <= '0;
        end
        default: state <= S_SYN;
      endcase
    end
  end

  assign ready = (state == S_SYN);

endmodule
