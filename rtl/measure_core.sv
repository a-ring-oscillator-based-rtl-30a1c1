// measure_core: the differential frequency measurement of one ring pair.
//
// Two W-bit counters count the oscillations of the two selected rings (f0 from
// set 0, f1 from set 1) at the same time. Each counter's overflow sets an RS
// flip-flop; the flip-flops' inverted outputs s0 and s1 are high while their
// counter has not overflowed. Both counters count while
//     running = enable & s0 & s1
// so the first overflow stops both. The counter that overflowed holds all ones
// and the other one holds about (f_slow / f_fast) * 2^W, the value the PUF
// uses. The result multiplexer picks res1 when counter 0 overflowed (s0 low)
// and res0 otherwise.
//
// The structure (two counters, two RS flip-flops, the running gate and the
// result multiplexer, and the names running/enable/s0/s1/res0/res1/result)
// are those of the original PUF proposal. The clear input, which clears both counters and resets
// both flip-flops, is this design's way of starting a new measurement.
//
// Timing: `enable` and `clr` come from the system clock domain and are
// asynchronous to the rings; the first and last count of each counter depend on
// ring phase, which adds a constant offset of 0 or 1 to the result. `done` is
// asynchronous too and must be synchronised by the reader; once it is high,
// result is stable until the next clear.
`timescale 1ns / 1ps
module measure_core #(
  parameter int unsigned W = 16
) (
  input  logic         f0,
  input  logic         f1,
  input  logic         enable,
  input  logic         clr,
  output logic         running,
  output logic         done,
  output logic [1:0]   ovf,
  output logic [W-1:0] res0,
  output logic [W-1:0] res1,
  output logic [W-1:0] result
);

  logic of0, of1;
  logic q0_unused, q1_unused;
  logic s0, s1;

  ro_counter #(.W(W)) u_cnt0 (.c(f0), .ce(running), .clr(clr), .q(res0), .of(of0));
  ro_counter #(.W(W)) u_cnt1 (.c(f1), .ce(running), .clr(clr), .q(res1), .of(of1));

  rs_flipflop u_rs0 (.s(of0), .r(clr), .q(q0_unused), .qn(s0));
  rs_flipflop u_rs1 (.s(of1), .r(clr), .q(q1_unused), .qn(s1));

  assign running = enable & s0 & s1;
  assign done    = ~(s0 & s1);
  assign ovf     = {~s1, ~s0};
  assign result  = s0 ? res0 : res1;

endmodule
