// ro_bank: behavioural model of one set of N ring oscillators.
//
// The PUF has two such sets; every ring in a set shares one enable, since all
// rings run during a measurement. Each ring gets its own five stage delays:
// NOMINAL_PS plus an offset in [-SPREAD_PS, +SPREAD_PS] taken from an integer
// hash of (SEED, ring index, stage). The offsets stand for the manufacturing
// variation of one chip: two banks with different SEED values behave like the
// same layout on two different FPGAs. The hash (a 32-bit multiply-xorshift
// mix) and the delay numbers are this model's own; the original proposal only
// fixes the ring structure and that there are two sets.
//
// Interface: en (input), osc[N] (outputs, one per ring). Not synthesizable.
`timescale 1ns / 1ps
module ro_bank #(
  parameter int unsigned N          = 150,
  parameter int unsigned SEED       = 1,
  parameter int unsigned NOMINAL_PS = 1000,
  parameter int unsigned SPREAD_PS  = 20,
  parameter int unsigned JITTER_PS  = 0
) (
  input  logic         en,
  output logic [N-1:0] osc
);

  function automatic int unsigned mix(input int unsigned seed, input int unsigned idx,
                                      input int unsigned stage);
    logic [31:0] h;
    h = seed * 32'h9E37_79B1 ^ (idx * 32'h85EB_CA77) ^ (stage * 32'hC2B2_AE3D);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic int unsigned stage_ps(input int unsigned idx, input int unsigned stage);
    return NOMINAL_PS + (mix(SEED, idx, stage) % (2 * SPREAD_PS + 1)) - SPREAD_PS;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_ro
    ring_oscillator #(
      .STAGE_PS ('{stage_ps(i, 0), stage_ps(i, 1), stage_ps(i, 2),
                   stage_ps(i, 3), stage_ps(i, 4)}),
      .JITTER_PS(JITTER_PS)
    ) u_ro (
      .en (en),
      .osc(osc[i])
    );
  end

endmodule
