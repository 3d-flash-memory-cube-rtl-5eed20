// tb_nand_main_fsm: checks the NAND command sequences produced by the main FSM.
//
// A small model stands in for the timing FSM (t_done a few clocks after t_start, DIS in the
// middle of data-out cycles). For each command the sequence of (cycle type, I/O source,
// opcode or address byte index) is recorded and compared with the ONFI sequence expected,
// including the number of data and parity cycles of a (shortened, 2-sector) page program and
// page read, the per-sector wait for the ECC in a read, and the strobes to host and ECC.
module tb_nand_main_fsm;
  import flash_pkg::*;

  localparam int NS = 2;
  localparam int PB = NS * SECT_BYTES;

  logic clk = 0, rst = 1;
  logic cmd_start, cmd_done, busy, t_start, t_done, DIS, ce_hold, cmd_we, rar_we;
  cmd_e cmd_code;
  tcmd_e t_cmd;
  io_sel_e adc_sel;
  logic [7:0] cmd_reg;
  logic [2:0] amx_sel;
  logic wr_valid, wr_ack, rd_stb, stat_stb, enEcc, en_dec_dir, page_begin;
  logic enc_stb, par_stb, spare_stb, ecc_done;
  logic [$clog2(NS)-1:0] sect;
  logic [$clog2(SECT_BYTES)-1:0] sbyte;
  logic [$clog2(PAR_BYTES)-1:0] spk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nand_main_fsm #(.NSECT(NS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // timing FSM stand-in: each op lasts 3 clocks, DIS in the 2nd
  int tcnt = 0;
  bit tbusy = 0;
  always @(posedge clk) begin
    if (t_start) begin tbusy <= 1; tcnt <= 0; end
    else if (tbusy) begin
      tcnt <= tcnt + 1;
      if (tcnt == 2) tbusy <= 0;
    end
  end
  assign t_done = tbusy && tcnt == 2;
  assign DIS    = tbusy && tcnt == 1 && t_cmd == T_DOUT;

  // ECC stand-in: done 10 clocks after the last spare byte of a sector
  int dec_cnt = -1;
  always @(posedge clk) begin
    if (spare_stb && spk == PAR_BYTES - 1) dec_cnt <= 10;
    else if (dec_cnt > 0) dec_cnt <= dec_cnt - 1;
    else dec_cnt <= -1;
  end
  assign ecc_done = (dec_cnt == 0);

  // recorder
  string seq[$];
  int n_din, n_pin, n_dout, n_spare, n_enc, n_rd, n_stat, n_wait, n_ack, n_pb;
  always @(posedge clk) begin
    if (t_start) begin
      case (t_cmd)
        T_CMD:  seq.push_back($sformatf("C%02h", cmd_reg));
        T_ADDR: seq.push_back($sformatf("A%0d", amx_sel));
        T_WAIT: begin seq.push_back("W"); n_wait++; end
        T_DIN:  if (adc_sel == IO_WDATA) n_din++; else n_pin++;
        default: ;
      endcase
    end
    if (t_start && t_cmd == T_DIN) check(adc_sel == IO_WDATA || adc_sel == IO_PARITY, "din source");
    if (t_start && t_cmd == T_CMD) check(adc_sel == IO_CMD && cmd_we, "command source");
    if (t_start && t_cmd == T_ADDR) check(adc_sel == IO_ADDR, "address source");
    if (rd_stb) n_rd++;
    if (spare_stb) n_spare++;
    if (enc_stb) n_enc++;
    if (stat_stb) n_stat++;
    if (wr_ack) n_ack++;
    if (par_stb) n_pb++;
  end

  task automatic run(cmd_e c, output string s);
    seq = {}; n_din = 0; n_pin = 0; n_rd = 0; n_spare = 0; n_enc = 0; n_stat = 0;
    n_wait = 0; n_ack = 0; n_pb = 0;
    @(posedge clk);
    cmd_code <= c; cmd_start <= 1;
    @(posedge clk);
    cmd_start <= 0;
    while (!cmd_done) @(posedge clk);
    s = "";
    foreach (seq[i]) s = {s, seq[i], " "};
  endtask

  initial begin
    string s;
    cmd_start = 0; cmd_code = CMD_RESET; wr_valid = 1;
    repeat (3) @(posedge clk);
    rst <= 0;

    run(CMD_RESET, s);
    check(s == "Cff W ", {"reset: ", s});
    run(CMD_READ_ID, s);
    check(s == "C90 A5 " && n_rd == 5, {"read id: ", s});
    run(CMD_READ_STAT, s);
    check(s == "C70 " && n_rd == 1, {"read status: ", s});
    run(CMD_ERASE, s);
    check(s == "C60 A2 A3 A4 Cd0 W C70 " && n_stat == 1, {"erase: ", s});
    run(CMD_PROG_PAGE, s);
    check(s == "C80 A0 A1 A2 A3 A4 C10 W C70 ", {"program: ", s});
    check(n_din == PB && n_enc == PB && n_ack == PB, $sformatf("program data cycles %0d", n_din));
    check(n_pin == NS * PAR_BYTES && n_pb == NS * PAR_BYTES, $sformatf("program parity cycles %0d", n_pin));
    check(n_stat == 1, "program status read");
    run(CMD_READ_PAGE, s);
    check(s == "C00 A0 A1 A2 A3 A4 C30 W ", {"read page: ", s});
    check(n_rd == PB && n_spare == NS * PAR_BYTES, $sformatf("read cycles %0d/%0d", n_rd, n_spare));

    // back-pressure: without wr_valid the program stalls in its data phase
    wr_valid = 0;
    fork
      begin
        automatic string s2;
        run(CMD_PROG_PAGE, s2);
      end
      begin
        repeat (200) @(posedge clk);
        check(n_din == 0 && busy, "program waits for wr_valid");
        wr_valid = 1;
      end
    join
    check(n_din == PB, "program completes after wr_valid");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
