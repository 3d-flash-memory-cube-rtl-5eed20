// sync_fifo: single-clock first-in first-out queue.
//
// Used for the garbage-collection queue of relocated blocks and inside the bad-block FIFO.
// push writes din when not full; pop discards the head (dout) when not empty; both may happen
// in the same cycle. count is the number of entries held. A push into a full FIFO is dropped
// and sets the sticky overflow flag (cleared by reset). dout is the head entry, valid while
// empty is low. Storage is an array of DEPTH words (DEPTH a power of two).
// The design choice of depth and the overflow behaviour are this design's; the blocks that use
// the queue are described only as "a FIFO".
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      unique case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (push && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  assign dout  = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));

  a_no_underflow: assert property (@(posedge clk) disable iff (rst) empty |-> count == '0);

endmodule
