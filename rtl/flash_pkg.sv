// flash_pkg: constants, types and Galois-field helpers shared by the flash cube controller.
//
// Geometry follows the cube: 24 NAND dies, each with an 8-bit I/O, so the controller moves
// 192 bits per data cycle. A page is 16384 data bytes plus 1216 spare bytes; an erase block
// holds 256 pages; block, page and column addresses are 11, 8 and 15 bits wide. Five address
// cycles carry column (2 cycles) then row (3 cycles), as the NAND interface expects.
//
// Error correction is a binary BCH code over GF(2^13) with 4096 data bits per codeword and
// t = 22 correctable bits, giving 22*13 = 286 parity bits (BCH[4382,4096]). The field is built
// on the primitive polynomial x^13+x^4+x^3+x+1 (the choice of polynomial is this design's).
// BCH_GEN holds the generator polynomial g(x), the product of the distinct minimal polynomials
// of alpha^1, alpha^3, ..., alpha^43; bit k is the coefficient of x^k. It is checked against an
// independent computation in the encoder testbench.
package flash_pkg;

  // ---------------- cube geometry ----------------
  localparam int unsigned NDIE        = 24;     // dies in the stack
  localparam int unsigned DIE_W       = 8;      // I/O bits per die
  localparam int unsigned BUS_W       = NDIE * DIE_W;  // 192
  localparam int unsigned PAGE_DATA   = 16384;  // data bytes per page
  localparam int unsigned PAGE_SPARE  = 1216;   // spare bytes per page
  localparam int unsigned PAGES_PER_BLOCK = 256;
  localparam int unsigned BLOCK_W     = 11;
  localparam int unsigned PAGE_W      = 8;
  localparam int unsigned COL_W       = 15;

  // ---------------- NAND command opcodes (ONFI) ----------------
  localparam logic [7:0] NAND_RESET      = 8'hFF;
  localparam logic [7:0] NAND_READ_ID    = 8'h90;
  localparam logic [7:0] NAND_READ_STAT  = 8'h70;
  localparam logic [7:0] NAND_READ_1     = 8'h00;
  localparam logic [7:0] NAND_READ_2     = 8'h30;
  localparam logic [7:0] NAND_PROG_1     = 8'h80;
  localparam logic [7:0] NAND_PROG_2     = 8'h10;
  localparam logic [7:0] NAND_ERASE_1    = 8'h60;
  localparam logic [7:0] NAND_ERASE_2    = 8'hD0;

  // Host-level command codes accepted on cmd_code
  typedef enum logic [2:0] {
    CMD_RESET     = 3'd0,
    CMD_READ_PAGE = 3'd1,
    CMD_PROG_PAGE = 3'd2,
    CMD_ERASE     = 3'd3,
    CMD_READ_ID   = 3'd4,
    CMD_READ_STAT = 3'd5
  } cmd_e;

  // Operations the main FSM asks of the timing FSM (t_cmd)
  typedef enum logic [2:0] {
    T_CMD   = 3'd0,   // one command latch cycle (CLE)
    T_ADDR  = 3'd1,   // one address latch cycle (ALE)
    T_DIN   = 3'd2,   // one data cycle controller -> die (WE_n strobe)
    T_DOUT  = 3'd3,   // one data cycle die -> controller (RE_n strobe)
    T_WAIT  = 3'd4    // wait for R/B# high
  } tcmd_e;

  // What the controller drives onto the I/O of every die (adc_sel)
  typedef enum logic [1:0] {
    IO_CMD    = 2'd0,   // cmd_reg
    IO_ADDR   = 2'd1,   // address byte amx_sel
    IO_WDATA  = 2'd2,   // host write data (one byte per die)
    IO_PARITY = 2'd3    // ECC parity byte of each die
  } io_sel_e;

  // ---------------- BCH code ----------------
  localparam int unsigned GF_M      = 13;
  localparam int unsigned GF_N      = (1 << GF_M) - 1;   // 8191
  localparam logic [GF_M:0] GF_POLY = 14'b10000000011011; // x^13+x^4+x^3+x+1
  localparam int unsigned BCH_K     = 4096;
  localparam int unsigned BCH_T     = 22;
  localparam int unsigned BCH_P     = BCH_T * GF_M;      // 286 parity bits
  localparam int unsigned BCH_N     = BCH_K + BCH_P;     // 4382
  localparam int unsigned SECT_BYTES   = BCH_K / 8;                 // 512
  localparam int unsigned PAR_BYTES    = (BCH_P + 7) / 8;           // 36
  localparam int unsigned CW_BYTES     = SECT_BYTES + PAR_BYTES;    // 548
  localparam int unsigned PAR_PAD      = PAR_BYTES * 8 - BCH_P;     // 2 zero bits
  localparam int unsigned SECTORS      = PAGE_DATA / SECT_BYTES;    // 32

  localparam logic [BCH_P:0] BCH_GEN =
    287'h543737dc36a6618dea18130efbc6e6355a8900a81894a3f0ebcc4a3881a93697624381a7;

  typedef logic [GF_M-1:0] gf_t;

  // Multiply two field elements (shift-and-add with reduction by GF_POLY).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [GF_M-1:0] acc;
    logic [GF_M-1:0] aa;
    acc = '0;
    aa  = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa[GF_M-1] ? ((aa << 1) ^ GF_POLY[GF_M-1:0]) : (aa << 1);
    end
    return acc;
  endfunction

  // alpha^e for any non-negative exponent (square-and-multiply).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r, b;
    int unsigned k;
    r = gf_t'(1);
    b = gf_t'(2);
    k = e % GF_N;
    for (int i = 0; i < GF_M; i++) begin
      if (k[i]) r = gf_mul(r, b);
      b = gf_mul(b, b);
    end
    return r;
  endfunction

endpackage
