// ring_oscillator: behavioural model of a five-stage ring oscillator.
//
// The ring is one NAND gate followed by four inverters, the NAND's second input
// being the enable. With en high the loop holds an odd number of inversions and
// oscillates; with en low the NAND output sits high and the ring output low.
// A ring is a combinational loop that a cycle-based simulator cannot execute, so
// this file is a behavioural model (not synthesizable): the output toggles after
// the sum of the five stage delays, which is the ring's half period. An optional
// random jitter of up to +/-JITTER_PS per half period stands for the ring's
// instability. The ring structure is the original proposal's; the delay numbers are
// this model's own and are meant to be varied per ring (see ro_bank).
//
// Interface: en (input), osc (output). Period = 2 * sum(STAGE_PS) picoseconds.
`timescale 1ns / 1ps
module ring_oscillator #(
  parameter int unsigned STAGE_PS [5] = '{1000, 1000, 1000, 1000, 1000},
  parameter int unsigned JITTER_PS = 0
) (
  input  logic en,
  output logic osc
);

  localparam int unsigned HALF_PS = STAGE_PS[0] + STAGE_PS[1] + STAGE_PS[2]
                                  + STAGE_PS[3] + STAGE_PS[4];

  logic ring;

  initial ring = 1'b0;
  assign osc = ring;

  always begin : ring_loop
    int signed half;
    if (!en) begin
      ring = 1'b0;
      wait (en);
    end
    half = int'(HALF_PS);
    if (JITTER_PS != 0)
      half = half + int'($urandom_range(2 * JITTER_PS, 0)) - int'(JITTER_PS);
    #(real'(half) / 1000.0);  // picoseconds to the 1 ns time unit
    if (en) ring = ~ring;
  end

endmodule
