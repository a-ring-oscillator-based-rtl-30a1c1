// rs_flipflop: set-reset flip-flop with Q and Q-bar outputs.
//
// A level-sensitive storage element with no clock: `s` high sets Q, `r` high
// resets it, both low hold. In the PUF, S is the overflow of one counter and
// Q-bar is the "still counting" signal of that counter, so the flip-flop keeps
// the stop condition although no further ring edge arrives. Using an RS flip-flop
// for overflow detection is the original proposal's choice. Set wins if both are
// high (a choice of this design; in use the clear that drives R also clears
// the counter that drives S).
//
// It is deliberately a latch: the set comes from one ring's clock domain and
// must act on the other counter with no common clock.
`timescale 1ns / 1ps
module rs_flipflop (
  input  logic s,
  input  logic r,
  output logic q,
  output logic qn
);

  always_latch begin
    if (s)      q = 1'b1;
    else if (r) q = 1'b0;
  end

  assign qn = ~q;

endmodule
