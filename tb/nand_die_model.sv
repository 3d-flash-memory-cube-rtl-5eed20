// nand_die_model: behavioural model of one 32Gb NAND Flash die (8-bit I/O) for simulation.
//
// Not synthesizable. It latches commands, addresses and data on the rising edge of WE_n
// (with CE_n low) and drives data after the falling edge of RE_n. Supported: FFh reset,
// 90h read ID, 70h read status, 00h/30h page read, 80h/10h page program, 60h/D0h block erase.
// Pages are 17600 bytes (16384 data + 1216 spare), 256 per block; five address cycles (two
// column, three row). Only written pages are stored; an unwritten or erased page reads as FFh.
// R_nB goes low for BUSY time units after 30h, 10h, D0h and FFh. The status byte has bit 6 =
// ready and bit 0 = fail; fail_next_prog/fail_next_erase make the next program/erase report
// failure. flip_bit() corrupts a stored bit, to exercise the ECC.
module nand_die_model #(
  parameter int          PAGE_BYTES = 17600,
  parameter int          BUSY       = 200,
  parameter logic [7:0]  ID3        = 8'h00
) (
  input  logic [7:0] IO_i,
  output logic [7:0] IO_o,
  input  logic       CLE,
  input  logic       ALE,
  input  logic       WE_n,
  input  logic       RE_n,
  input  logic       CE_n,
  input  logic       WP_n,
  output logic       R_nB
);

  typedef byte unsigned page_t [PAGE_BYTES];
  page_t pages [int];
  page_t preg;

  typedef enum {MD_NONE, MD_ID, MD_STAT, MD_READ, MD_PROG, MD_ERASE} mode_e;
  mode_e mode = MD_NONE, prev_mode = MD_NONE;
  int    acnt = 0;
  int    col  = 0;
  int    row  = 0;
  int    idx  = 0;
  bit    fail = 0;
  bit    fail_next_prog = 0;
  bit    fail_next_erase = 0;
  int    n_reset = 0, n_prog = 0, n_read = 0, n_erase = 0;
  byte unsigned id_bytes [5];

  initial begin
    R_nB = 1;
    IO_o = 8'h00;
    id_bytes = '{8'h2C, 8'h68, 8'h00, ID3, 8'hA9};
  end

  task automatic go_busy();
    R_nB = 0;
    fork begin #(BUSY); R_nB = 1; end join_none
  endtask

  task automatic load_page();
    if (pages.exists(row)) preg = pages[row];
    else foreach (preg[i]) preg[i] = 8'hFF;
  endtask

  function automatic void flip_bit(int r, int c, int b);
    page_t p;
    if (pages.exists(r)) p = pages[r];
    else foreach (p[i]) p[i] = 8'hFF;
    p[c][b] = ~p[c][b];
    pages[r] = p;
  endfunction

  function automatic byte unsigned peek(int r, int c);
    if (pages.exists(r)) return pages[r][c];
    return 8'hFF;
  endfunction

  always @(posedge WE_n) begin
    if (!CE_n) begin
      if (CLE) begin
        case (IO_i)
          8'hFF: begin mode = MD_NONE; fail = 0; n_reset++; go_busy(); end
          8'h90: begin mode = MD_ID; acnt = 0; idx = 0; end
          8'h70: begin prev_mode = mode; mode = MD_STAT; end
          8'h00: begin mode = MD_READ; acnt = 0; end
          8'h30: begin load_page(); idx = col; n_read++; go_busy(); end
          8'h80: begin mode = MD_PROG; acnt = 0; foreach (preg[i]) preg[i] = 8'hFF; end
          8'h10: begin
            fail = fail_next_prog || !WP_n;
            fail_next_prog = 0;
            if (!fail) pages[row] = preg;
            n_prog++;
            go_busy();
          end
          8'h60: begin mode = MD_ERASE; acnt = 0; row = 0; end
          8'hD0: begin
            fail = fail_next_erase || !WP_n;
            fail_next_erase = 0;
            if (!fail) for (int p = 0; p < 256; p++) pages.delete((row & ~255) + p);
            n_erase++;
            go_busy();
          end
          default: ;
        endcase
      end else if (ALE) begin
        if (mode == MD_ERASE) begin
          row = row | (int'(IO_i) << (8 * acnt));
        end else if (mode != MD_ID) begin
          case (acnt)
            0: begin col = int'(IO_i); row = 0; end
            1: col = col | (int'(IO_i) << 8);
            default: row = row | (int'(IO_i) << (8 * (acnt - 2)));
          endcase
          idx = col;
        end
        acnt++;
      end else if (mode == MD_PROG) begin
        if (idx < PAGE_BYTES) preg[idx] = IO_i;
        idx++;
      end
    end
  end

  always @(negedge RE_n) begin
    if (!CE_n) begin
      case (mode)
        MD_ID:   begin IO_o = id_bytes[idx % 5]; idx++; end
        MD_STAT: IO_o = {1'b1, R_nB, 5'b0, fail};
        MD_READ: begin IO_o = (idx < PAGE_BYTES) ? preg[idx] : 8'h00; idx++; end
        default: IO_o = 8'h00;
      endcase
    end
  end

endmodule
