// response_reg: assembles the PUF response from the bits of every ring pair.
//
// Each measured pair contributes WB selected bits; pair k is written to bits
// [k*WB +: WB] of `response`, so a full sweep over N_PAIRS pairs gives an
// N_PAIRS*WB-bit response (300 bits for 150 pairs and two positions). `clear`
// zeroes the register before a sweep. The packing order is this design's
// choice.
//
// Timing: synchronous to clk; a write with `we` high appears on `response`
// after the next rising edge. Reset is asynchronous, active low.
`timescale 1ns / 1ps
module response_reg #(
  parameter int unsigned N_PAIRS = 150,
  parameter int unsigned WB      = 2,
  localparam int unsigned IW     = (N_PAIRS > 1) ? $clog2(N_PAIRS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  we,
  input  logic [IW-1:0]         idx,
  input  logic [WB-1:0]         bits,
  output logic [N_PAIRS*WB-1:0] response
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       response <= '0;
    else if (clear)                   response <= '0;
    else if (we && 32'(idx) < N_PAIRS) response[idx*WB +: WB] <= bits;
  end

endmodule
