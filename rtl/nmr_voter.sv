// nmr_voter: bitwise 2-of-3 majority vote over the read data of three redundant modules.
//
// In triple-modular-redundancy mode the edge module of a daisy chain reads the same address
// from itself and two redundant modules and returns the vote, so the host sees a single
// device. Each output bit is the majority of the three input bits. disagree[m] flags that
// module m differs from the vote in at least one bit (a module to be scrubbed or retired);
// uncertain is set when more than one module disagrees somewhere (each in different bits), so
// no single module can be blamed. The result is registered: in_valid to out_valid takes one
// clock.
// Majority voting among the redundant modules follows the cube's description; the width, the
// flags and the register stage are this design's.
module nmr_voter #(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  output logic         out_valid,
  output logic [W-1:0] q,
  output logic [2:0]   disagree,
  output logic         uncertain
);

  logic [W-1:0] maj;
  logic [2:0]   dis;

  always_comb begin
    maj    = (d0 & d1) | (d0 & d2) | (d1 & d2);
    dis[0] = (d0 != maj);
    dis[1] = (d1 != maj);
    dis[2] = (d2 != maj);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      q         <= '0;
      disagree  <= '0;
      uncertain <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        q         <= maj;
        disagree  <= dis;
        uncertain <= ($countones(dis) > 1);
      end
    end
  end

endmodule
