// sync2: two-flop synchroniser for one asynchronous level.
//
// Brings a signal from another clock domain (here the ring-clocked measurement
// logic) into the clk domain. Output `q` follows `d` two to three clk edges
// later. Reset is asynchronous, active low, and clears both flops.
`timescale 1ns / 1ps
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end

endmodule
