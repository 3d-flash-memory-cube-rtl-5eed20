// nand_main_fsm: sequences each host command into NAND bus operations for the timing FSM.
//
// For every command it walks through the ONFI sequence and, for each bus cycle, selects what
// goes on the I/O (adc_sel, cmd_reg, amx_sel), pulses t_start with the cycle type t_cmd and
// waits for t_done:
//   RESET        FFh, wait R/B#
//   READ ID      90h, address 00h, ID_BYTES data-out cycles
//   READ STATUS  70h, one data-out cycle
//   ERASE        60h, 3 row address cycles, D0h, wait R/B#, 70h, status read
//   PROGRAM      80h, 5 address cycles, the page data (host words, each die's byte encoded by
//                its ECC on the way), the parity of all sectors into the spare area, 10h,
//                wait R/B#, 70h, status read
//   READ PAGE    00h, 5 address cycles, 30h, wait R/B#, the page data (to the host and through
//                the ECC), then per sector: its 36 spare parity bytes, and a wait until the
//                ECC decoders of all dies have reported that sector (ecc_done)
// cmd_done pulses when the command is over. Column is sent in two address cycles, the
// row {block, page} in three, low byte first.
// Handshakes: a page data word is written when wr_valid is high; wr_ack pulses when it has
// been taken. rd_stb marks a data byte captured from the dies (page data, ID or status);
// stat_stb marks the status byte of erase/program. The strobes towards the ECC (enc_stb,
// par_stb, spare_stb) carry the sector/byte counters sect and spk.
// The command set and the main/timing split follow the controller's description; the exact
// sequences are those of an ONFI NAND die, and the page layout (ECC of sector s at spare
// bytes 36*s .. 36*s+35) is this design's choice.
module nand_main_fsm
  import flash_pkg::*;
#(
  parameter int unsigned NSECT    = SECTORS,   // sectors (ECC codewords) per page
  parameter int unsigned ID_BYTES = 5
) (
  input  logic                 clk,
  input  logic                 rst,
  // host command
  input  logic                 cmd_start,
  input  cmd_e                 cmd_code,
  output logic                 cmd_done,
  output logic                 busy,
  // timing FSM
  output logic                 t_start,
  output tcmd_e                t_cmd,
  input  logic                 t_done,
  input  logic                 DIS,
  output logic                 ce_hold,
  // I/O source selection
  output io_sel_e              adc_sel,
  output logic [7:0]           cmd_reg,
  output logic                 cmd_we,
  output logic [2:0]           amx_sel,
  output logic                 rar_we,
  // host data
  input  logic                 wr_valid,
  output logic                 wr_ack,
  output logic                 rd_stb,
  output logic                 stat_stb,
  // ECC
  output logic                 enEcc,
  output logic                 en_dec_dir,   // 1 = decode (read)
  output logic                 page_begin,
  output logic                 enc_stb,
  output logic                 par_stb,
  output logic                 spare_stb,
  output logic [$clog2(NSECT)-1:0] sect,
  output logic [$clog2(SECT_BYTES)-1:0] sbyte,
  output logic [$clog2(PAR_BYTES)-1:0]  spk,
  input  logic                 ecc_done
);

  localparam int unsigned SW = $clog2(NSECT);

  typedef enum logic [3:0] {
    M_IDLE, M_C1, M_ADDR, M_DIN, M_PIN, M_C2, M_WAIT, M_SC, M_SR,
    M_DOUT, M_SPR, M_DEC, M_DONE
  } state_e;

  state_e          state;
  cmd_e            cmd;
  logic            issued;
  logic [2:0]      acnt, alast;
  logic [15:0]     dcnt;              // data bytes moved in this phase
  logic [SW-1:0]   s_q;
  logic [$clog2(PAR_BYTES)-1:0] k_q;

  localparam int unsigned PAGE_BYTES = NSECT * SECT_BYTES;

  wire op_done = issued && t_done;

  function automatic logic [7:0] first_opcode(cmd_e c);
    case (c)
      CMD_RESET:     return NAND_RESET;
      CMD_READ_ID:   return NAND_READ_ID;
      CMD_READ_STAT: return NAND_READ_STAT;
      CMD_ERASE:     return NAND_ERASE_1;
      CMD_PROG_PAGE: return NAND_PROG_1;
      default:       return NAND_READ_1;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      cmd      <= CMD_RESET;
      issued   <= 1'b0;
      t_start  <= 1'b0;
      t_cmd    <= T_CMD;
      acnt     <= '0;
      alast    <= '0;
      dcnt     <= '0;
      s_q      <= '0;
      k_q      <= '0;
      cmd_reg  <= '0;
      cmd_done <= 1'b0;
    end else begin
      t_start  <= 1'b0;
      cmd_done <= 1'b0;
      case (state)
        M_IDLE: if (cmd_start) begin
          cmd     <= cmd_code;
          cmd_reg <= first_opcode(cmd_code);
          state   <= M_C1;
          issued  <= 1'b0;
        end
        M_C1: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_CMD; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            dcnt   <= '0;
            s_q    <= '0;
            k_q    <= '0;
            unique case (cmd)
              CMD_RESET:     state <= M_WAIT;
              CMD_READ_STAT: state <= M_DOUT;
              CMD_READ_ID:   begin state <= M_ADDR; acnt <= 3'd5; alast <= 3'd5; end
              CMD_ERASE:     begin state <= M_ADDR; acnt <= 3'd2; alast <= 3'd4; end
              default:       begin state <= M_ADDR; acnt <= 3'd0; alast <= 3'd4; end
            endcase
          end
        end
        M_ADDR: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_ADDR; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            acnt   <= acnt + 1'b1;
            if (acnt == alast) begin
              unique case (cmd)
                CMD_READ_ID:   state <= M_DOUT;
                CMD_PROG_PAGE: state <= M_DIN;
                CMD_ERASE:     begin state <= M_C2; cmd_reg <= NAND_ERASE_2; end
                default:       begin state <= M_C2; cmd_reg <= NAND_READ_2; end
              endcase
            end
          end
        end
        M_DIN: begin          // page data from the host
          if (!issued) begin
            if (wr_valid) begin t_start <= 1'b1; t_cmd <= T_DIN; issued <= 1'b1; end
          end else if (t_done) begin
            issued <= 1'b0;
            dcnt   <= dcnt + 1'b1;
            if (dcnt == 16'(PAGE_BYTES - 1)) state <= M_PIN;
          end
        end
        M_PIN: begin          // parity bytes of every sector into the spare area
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_DIN; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            k_q    <= k_q + 1'b1;
            if (k_q == ($clog2(PAR_BYTES))'(PAR_BYTES - 1)) begin
              k_q <= '0;
              s_q <= s_q + 1'b1;
              if (s_q == SW'(NSECT - 1)) begin state <= M_C2; cmd_reg <= NAND_PROG_2; end
            end
          end
        end
        M_C2: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_CMD; issued <= 1'b1; end
          else if (t_done) begin issued <= 1'b0; state <= M_WAIT; end
        end
        M_WAIT: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_WAIT; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            dcnt   <= '0;
            s_q    <= '0;
            k_q    <= '0;
            unique case (cmd)
              CMD_READ_PAGE:            state <= M_DOUT;
              CMD_PROG_PAGE, CMD_ERASE: begin state <= M_SC; cmd_reg <= NAND_READ_STAT; end
              default:                  state <= M_DONE;
            endcase
          end
        end
        M_SC: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_CMD; issued <= 1'b1; end
          else if (t_done) begin issued <= 1'b0; state <= M_SR; end
        end
        M_SR: begin
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_DOUT; issued <= 1'b1; end
          else if (t_done) begin issued <= 1'b0; state <= M_DONE; end
        end
        M_DOUT: begin         // page data, ID bytes or the status byte to the host
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_DOUT; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            dcnt   <= dcnt + 1'b1;
            unique case (cmd)
              CMD_READ_PAGE: if (dcnt == 16'(PAGE_BYTES - 1)) state <= M_SPR;
              CMD_READ_ID:   if (dcnt == 16'(ID_BYTES - 1)) state <= M_DONE;
              default:       state <= M_DONE;
            endcase
          end
        end
        M_SPR: begin          // the spare parity bytes of sector s_q
          if (!issued) begin t_start <= 1'b1; t_cmd <= T_DOUT; issued <= 1'b1; end
          else if (t_done) begin
            issued <= 1'b0;
            k_q    <= k_q + 1'b1;
            if (k_q == ($clog2(PAR_BYTES))'(PAR_BYTES - 1)) begin
              k_q   <= '0;
              state <= M_DEC;
            end
          end
        end
        M_DEC: if (ecc_done) begin
          s_q <= s_q + 1'b1;
          state <= (s_q == SW'(NSECT - 1)) ? M_DONE : M_SPR;
        end
        M_DONE: begin
          cmd_done <= 1'b1;
          state    <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      M_ADDR:       adc_sel = IO_ADDR;
      M_DIN:        adc_sel = IO_WDATA;
      M_PIN:        adc_sel = IO_PARITY;
      default:      adc_sel = IO_CMD;
    endcase
    cmd_we     = (state == M_C1 || state == M_C2 || state == M_SC);
    amx_sel    = acnt;
    rar_we     = (state == M_IDLE) && cmd_start;
    ce_hold    = (state != M_IDLE);
    busy       = (state != M_IDLE);
    wr_ack     = (state == M_DIN) && op_done;
    enc_stb    = (state == M_DIN) && op_done;
    par_stb    = (state == M_PIN) && op_done;
    rd_stb     = (state == M_DOUT) && issued && DIS;
    spare_stb  = (state == M_SPR) && issued && DIS;
    stat_stb   = (state == M_SR) && issued && DIS;
    enEcc      = (cmd == CMD_PROG_PAGE || cmd == CMD_READ_PAGE) && state != M_IDLE;
    en_dec_dir = (cmd == CMD_READ_PAGE);
    page_begin = (state == M_ADDR) && op_done && (acnt == alast) &&
                 (cmd == CMD_PROG_PAGE || cmd == CMD_READ_PAGE);
    sect       = (state == M_DIN || state == M_DOUT) ? SW'(dcnt / SECT_BYTES) : s_q;
    sbyte      = ($clog2(SECT_BYTES))'(dcnt % SECT_BYTES);
    spk        = k_q;
  end

endmodule
