// ropuf_pkg: constants and helper functions shared by the ring-oscillator PUF.
//
// CNT_W is the width of the two oscillation counters; 16 bits is the size the
// design is built around (a counter value of about (f_slow/f_fast) * 2^16).
// bin2gray converts a binary value to reflected Gray code. pos2bit maps a
// "position" to a bit index: positions are numbered from 1 at the MSB to W at
// the LSB, the way the bit selections of the PUF output are named.
// ctrl_state_t is the state type of the sequencer.
`timescale 1ns / 1ps
package ropuf_pkg;

  localparam int unsigned CNT_W = 16;

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_SETTLE,
    ST_RUN,
    ST_CAPTURE,
    ST_NEXT
  } ctrl_state_t;

  function automatic logic [CNT_W-1:0] bin2gray(input logic [CNT_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic int unsigned pos2bit(input int unsigned w, input int unsigned pos);
    return w - pos;
  endfunction

endpackage
