// ro_mux: challenge multiplexer in front of one oscillation counter.
//
// Routes ring oscillator number `sel` of one set to the clock input of a
// counter. `sel` is one half of the challenge (sel0 for set 0, sel1 for set 1).
// It is purely combinational; an index of N or more gives a constant low output.
// The multiplexers on the challenge are part of the original proposal; the
// binary select encoding is this design's choice.
//
// Timing: the output glitches while `sel` changes, so the sequencer changes the
// challenge only while the counters are disabled and waits before enabling them.
`timescale 1ns / 1ps
module ro_mux #(
  parameter int unsigned N  = 150,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ro,
  input  logic [SW-1:0] sel,
  output logic          f_out
);

  always_comb begin
    f_out = 1'b0;
    if (32'(sel) < N) f_out = ro[sel];
  end

endmodule
