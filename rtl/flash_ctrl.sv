// flash_ctrl: NAND Flash controller for the 24 dies of the cube, operated in lockstep.
//
// All dies share CLE, ALE, WE_n, RE_n, CE_n and WP_n; each has its own 8-bit I/O, so one bus
// cycle moves 24 bytes (192 bits). A command (cmd_code, with block/page/column) starts with
// cmd_start and ends with cmd_done. Inside:
//   nand_main_fsm    command sequencing and I/O source selection,
//   nand_timing_fsm  the bus cycles,
//   page_ecc x NDIE  the BCH encoder/decoder of each die's page,
//   and the "logic": the row/column address register, the address and I/O multiplexers, and
//   the capture registers for data, ID and status.
// Page program: the host presents data_to_be_written (one byte per die) with wr_valid and gets
// wr_ack when it is taken; the parity follows into the spare area automatically. The status
// read at the end gives prog_fail/erase fail per die in stat_fail (status bit 0).
// Page read: rd_data/rd_valid deliver the page as read (uncorrected), one 192-bit word per bus
// cycle; then, per sector, the ECC reports corr_valid/corr_col/corr_mask: XOR corr_mask into
// the bytes at column corr_col (bit 8*i+b for die i) to correct the page. ecc_max_err and
// ecc_fail summarise the page per die.
// The die I/O is split into DIO_o/DIO_oe/DIO_i; the tristate pad sits outside this module.
// The signal set follows the controller's interface table; the split I/O, the handshakes and
// the correction report are this design's choices. WP_n is held high (writes allowed).
module flash_ctrl
  import flash_pkg::*;
#(
  parameter int unsigned N_DIE = NDIE,
  parameter int unsigned NSECT = SECTORS,
  parameter int unsigned TWP   = 2,
  parameter int unsigned TWH   = 2,
  parameter int unsigned TRP   = 2,
  parameter int unsigned TREH  = 2,
  parameter int unsigned TWB   = 4
) (
  input  logic                   CLK,
  input  logic                   rst,
  // NAND side
  output logic [N_DIE*8-1:0]     DIO_o,
  output logic                   DIO_oe,
  input  logic [N_DIE*8-1:0]     DIO_i,
  output logic                   CLE,
  output logic                   ALE,
  output logic                   WE_n,
  output logic                   RE_n,
  output logic                   CE_n,
  output logic                   WP_n,
  input  logic                   R_nB,
  // host side
  input  cmd_e                   cmd_code,
  input  logic                   cmd_start,
  output logic                   cmd_done,
  output logic                   busy,
  input  logic [BLOCK_W-1:0]     block_value,
  input  logic [PAGE_W-1:0]      page_value,
  input  logic [COL_W-1:0]       col_value,
  input  logic [N_DIE*8-1:0]     data_to_be_written,
  input  logic                   wr_valid,
  output logic                   wr_ack,
  output logic [N_DIE*8-1:0]     rd_data,
  output logic                   rd_valid,
  output logic [N_DIE*8-1:0]     status,
  output logic [N_DIE-1:0]       stat_fail,
  output logic                   corr_valid,
  output logic [COL_W-1:0]       corr_col,
  output logic [N_DIE*8-1:0]     corr_mask,
  output logic                   ecc_sector_done,
  output logic [N_DIE*($clog2(BCH_T+1)+1)-1:0] ecc_max_err,
  output logic [N_DIE-1:0]       ecc_fail
);

  localparam int unsigned SW = $clog2(NSECT);
  localparam int unsigned EW = $clog2(BCH_T + 1) + 1;

  // ---------------- control ----------------
  logic    t_start, t_done, DOS_i, DIS, ce_hold;
  tcmd_e   t_cmd;
  io_sel_e adc_sel;
  logic [7:0] cmd_reg;
  logic       cmd_we, rar_we;
  logic [2:0] amx_sel;
  logic       rd_stb, stat_stb, enEcc, en_dec_dir, page_begin, enc_stb, par_stb, spare_stb;
  logic [SW-1:0] sect;
  logic [$clog2(SECT_BYTES)-1:0] sbyte;
  logic [$clog2(PAR_BYTES)-1:0]  spk;
  logic       ecc_done;

  nand_main_fsm #(.NSECT(NSECT)) u_main (
    .clk(CLK), .rst,
    .cmd_start, .cmd_code, .cmd_done, .busy,
    .t_start, .t_cmd, .t_done, .DIS, .ce_hold,
    .adc_sel, .cmd_reg, .cmd_we, .amx_sel, .rar_we,
    .wr_valid, .wr_ack, .rd_stb, .stat_stb,
    .enEcc, .en_dec_dir, .page_begin, .enc_stb, .par_stb, .spare_stb,
    .sect, .sbyte, .spk, .ecc_done
  );

  nand_timing_fsm #(.TWP(TWP), .TWH(TWH), .TRP(TRP), .TREH(TREH), .TWB(TWB)) u_timing (
    .clk(CLK), .rst,
    .t_start, .t_cmd, .ce_hold, .R_nB,
    .t_done, .DOS_i, .DIS, .CLE, .ALE, .WE_n, .RE_n, .CE_n
  );

  assign WP_n = 1'b1;

  // ---------------- row/column address register and mux ----------------
  logic [COL_W-1:0]            col_q;
  logic [BLOCK_W+PAGE_W-1:0]   row_q;
  logic [7:0]                  addr_byte;

  always_ff @(posedge CLK) begin
    if (rst) begin
      col_q <= '0;
      row_q <= '0;
    end else if (rar_we) begin
      col_q <= col_value;
      row_q <= {block_value, page_value};
    end
  end

  always_comb begin
    unique case (amx_sel)
      3'd0:    addr_byte = col_q[7:0];
      3'd1:    addr_byte = 8'(col_q[COL_W-1:8]);
      3'd2:    addr_byte = row_q[7:0];
      3'd3:    addr_byte = row_q[15:8];
      3'd4:    addr_byte = 8'(row_q[BLOCK_W+PAGE_W-1:16]);
      default: addr_byte = 8'h00;
    endcase
  end

  // ---------------- per-die ECC and I/O mux ----------------
  logic [N_DIE-1:0] lane_done, lane_cv, lane_fail;
  logic [COL_W-1:0] lane_col [N_DIE];

  for (genvar i = 0; i < N_DIE; i++) begin : g_lane
    logic [7:0] par_byte, mask;
    logic [EW-1:0] cnt, mx;

    page_ecc #(.NSECT(NSECT)) u_ecc (
      .clk(CLK), .rst,
      .page_begin,
      .data_stb (enc_stb || (rd_stb && en_dec_dir)),
      .data_in  (en_dec_dir ? DIO_i[8*i +: 8] : data_to_be_written[8*i +: 8]),
      .sect, .sbyte, .spk,
      .par_byte,
      .spare_stb,
      .spare_in (DIO_i[8*i +: 8]),
      .corr_valid(lane_cv[i]),
      .corr_col (lane_col[i]),
      .corr_mask(mask),
      .done     (lane_done[i]),
      .err_count(cnt),
      .max_err  (mx),
      .page_fail(lane_fail[i])
    );

    always_comb begin
      unique case (adc_sel)
        IO_CMD:    DIO_o[8*i +: 8] = cmd_reg;
        IO_ADDR:   DIO_o[8*i +: 8] = addr_byte;
        IO_WDATA:  DIO_o[8*i +: 8] = data_to_be_written[8*i +: 8];
        default:   DIO_o[8*i +: 8] = par_byte;
      endcase
    end

    assign corr_mask[8*i +: 8]       = mask;
    assign ecc_max_err[EW*i +: EW]   = mx;
    assign stat_fail[i]              = status[8*i];
  end

  assign ecc_done        = &lane_done;
  assign ecc_sector_done = ecc_done;
  assign corr_valid      = |lane_cv;
  assign corr_col        = lane_col[0];
  assign ecc_fail        = lane_fail;
  assign DIO_oe          = DOS_i;

  // ---------------- capture registers ----------------
  always_ff @(posedge CLK) begin
    if (rst) begin
      rd_data  <= '0;
      rd_valid <= 1'b0;
      status   <= '0;
    end else begin
      rd_valid <= rd_stb;
      if (rd_stb)   rd_data <= DIO_i;
      if (stat_stb) status  <= DIO_i;
    end
  end

  // the command byte is only driven in command cycles
  a_cmd_sel: assert property (@(posedge CLK) disable iff (rst) (CLE && !WE_n) |-> cmd_we);

endmodule
