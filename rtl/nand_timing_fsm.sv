// nand_timing_fsm: generates the NAND bus cycles (CLE, ALE, WE_n, RE_n, CE_n) for one
// operation at a time, as requested by the main FSM.
//
// The main FSM pulses t_start with an operation code t_cmd (see flash_pkg::tcmd_e):
//   T_CMD / T_ADDR / T_DIN  one write cycle: CLE (command) or ALE (address) is raised, the
//                           controller drives the I/O (dio_oe), WE_n is low for TWP clocks and
//                           high for TWH clocks; the die latches on the rising WE_n edge.
//   T_DOUT                  one read cycle: RE_n low for TRP clocks, the data-in strobe DIS
//                           pulses in the last low clock (the die output is sampled there), then
//                           RE_n high for TREH clocks.
//   T_WAIT                  waits TWB clocks (the die needs time to pull R/B# low), then until
//                           R_nB is high again.
// t_done pulses in the final clock of each operation; t_start is accepted only when idle.
// DOS_i (data-out strobe) is high while the controller must drive the I/O pins. CE_n is low
// while ce_hold is high (the main FSM holds it for a whole command) or an operation runs.
// The split into a main and a timing FSM and the signal names follow the controller's
// description; the cycle counts are parameters of this design, in controller clocks, to be set
// from the die's data sheet and the clock period.
module nand_timing_fsm
  import flash_pkg::*;
#(
  parameter int unsigned TWP  = 2,   // WE_n low time
  parameter int unsigned TWH  = 2,   // WE_n high time
  parameter int unsigned TRP  = 2,   // RE_n low time
  parameter int unsigned TREH = 2,   // RE_n high time
  parameter int unsigned TWB  = 4    // WE_n high to R/B# low
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  t_start,
  input  tcmd_e t_cmd,
  input  logic  ce_hold,
  input  logic  R_nB,
  output logic  t_done,
  output logic  DOS_i,
  output logic  DIS,
  output logic  CLE,
  output logic  ALE,
  output logic  WE_n,
  output logic  RE_n,
  output logic  CE_n
);

  localparam int unsigned CW = $clog2(TWP + TWH + TRP + TREH + TWB + 2);

  typedef enum logic [2:0] {S_IDLE, S_WLO, S_WHI, S_RLO, S_RHI, S_WB, S_BUSY} state_e;
  state_e        state;
  tcmd_e         op;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      op    <= T_CMD;
      cnt   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      case (state)
        S_IDLE: if (t_start) begin
          op  <= t_cmd;
          cnt <= '0;
          unique case (t_cmd)
            T_CMD, T_ADDR, T_DIN: state <= S_WLO;
            T_DOUT:               state <= S_RLO;
            default:              state <= S_WB;
          endcase
        end
        S_WLO: if (cnt == CW'(TWP - 1)) begin state <= S_WHI; cnt <= '0; end
        S_WHI: if (cnt == CW'(TWH - 1)) state <= S_IDLE;
        S_RLO: if (cnt == CW'(TRP - 1)) begin state <= S_RHI; cnt <= '0; end
        S_RHI: if (cnt == CW'(TREH - 1)) state <= S_IDLE;
        S_WB:  if (cnt == CW'(TWB - 1)) state <= S_BUSY;
        S_BUSY: if (R_nB) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    WE_n   = !(state == S_WLO);
    RE_n   = !(state == S_RLO);
    CLE    = (state == S_WLO || state == S_WHI) && op == T_CMD;
    ALE    = (state == S_WLO || state == S_WHI) && op == T_ADDR;
    DOS_i  = (state == S_WLO || state == S_WHI);
    DIS    = (state == S_RLO) && cnt == CW'(TRP - 1);
    CE_n   = !(ce_hold || state != S_IDLE);
    t_done = (state == S_WHI  && cnt == CW'(TWH - 1)) ||
             (state == S_RHI  && cnt == CW'(TREH - 1)) ||
             (state == S_BUSY && R_nB);
  end

  // a new operation may only be requested while idle
  a_start_idle: assert property (@(posedge clk) disable iff (rst) t_start |-> state == S_IDLE);

endmodule
