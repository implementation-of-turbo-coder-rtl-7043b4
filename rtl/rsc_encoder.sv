// rsc_encoder: rate-1/2, constraint-length-3 recursive systematic
// convolutional encoder, G = [1, (1 + D^2) / (1 + D + D^2)].
//
// The conventional feed-forward encoder with generators g1 = 111 and
// g2 = 101 is made recursive by feeding the g1 output back to the input:
// the register input is a = u ^ s1 ^ s2, the parity output is a ^ s2 and
// the systematic output is u itself.  Trellis functions live in turbo_pkg.
//
// Interface: one bit per cycle.  sys and par are combinational functions of
// the current state and u and are valid in the cycle u is presented with
// en = 1; the state advances at the clock edge.  clr (synchronous, higher
// priority than en) returns the state to zero, as at the start of a frame.
// rst is a synchronous active-high reset; its polarity and the clr input are
// this design's choice.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       en,
  input  logic       u,
  output logic       sys,
  output logic       par,
  output rsc_state_t state
);

  always_ff @(posedge clk) begin
    if (rst || clr)  state <= '0;
    else if (en)     state <= rsc_next(state, u);
  end

  always_comb begin
    sys = u;
    par = rsc_parity(state, u);
  end

endmodule
