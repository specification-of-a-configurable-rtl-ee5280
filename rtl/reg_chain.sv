// reg_chain: the register chain that carries the beats past the functional
// pages.
//
// One pipeline register sits between consecutive FPs so that no beat has to
// drive every page at once; stage k's output is the beat of stage 0 delayed
// by k+1 clock cycles. The document gives this structure (one register
// between every FP); the depth equals the number of FPs.
//
// Interface: beat_i is registered into stage 0 on every clock; taps_o[k] is
// the register output of stage k. Reset clears every stage's valid bit.
module reg_chain
  import gppp_pkg::*;
#(
  parameter int unsigned DEPTH = NFP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t beat_i,
  output beat_t taps_o [DEPTH]
);

  beat_t st_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) st_q[k] <= '0;
    end else begin
      st_q[0] <= beat_i;
      for (int k = 1; k < int'(DEPTH); k++) st_q[k] <= st_q[k-1];
    end
  end

  assign taps_o = st_q;

endmodule
