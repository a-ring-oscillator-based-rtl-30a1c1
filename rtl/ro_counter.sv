// ro_counter: W-bit up counter clocked by a ring oscillator.
//
// Counts rising edges of `c` while `ce` is high. `clr` clears the count
// asynchronously, because the ring clock may be stopped or slow when the
// measurement is prepared. `of` is the overflow flag: it is high while the
// count is all ones, so the counter that ends a measurement is left holding
// 2^W - 1 (0xFFFF for W = 16) once the overflow has removed its enable.
// The pins (C, CE, CLR, Q, OF) are those of the original proposal; the terminal-count reading of
// OF and the asynchronous clear are this design's choices.
//
// Timing: q changes on the rising edge of c; of follows q combinationally.
`timescale 1ns / 1ps
module ro_counter #(
  parameter int unsigned W = 16
) (
  input  logic         c,
  input  logic         ce,
  input  logic         clr,
  output logic [W-1:0] q,
  output logic         of
);

  always_ff @(posedge c or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= q + 1'b1;
  end

  assign of = &q;

endmodule
