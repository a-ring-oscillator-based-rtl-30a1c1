// ropuf_top: ring-oscillator physical unclonable function (PUF).
//
// Each chip has two sets of N identical five-stage ring oscillators whose
// frequencies differ slightly from ring to ring and from chip to chip. A
// challenge (sel0, sel1) picks one ring from each set. Two 16-bit counters
// count the two rings at the same time until one of them overflows; the other
// counter then holds about (f_slow / f_fast) * 2^16. That ratio does not need
// a reference clock, and its middle bits differ between chips while staying
// stable on one chip. The value is converted to Gray code and the bits at
// positions POS_FIRST..POS_LAST (1 = MSB) become the PUF output of that pair;
// a sweep over pairs (k, k), k = 0..N-1, gives an N*(POS_LAST-POS_FIRST+1)-bit
// response.
//
// Blocks: ro_bank x2 (behavioural models of the silicon rings), ro_mux x2,
// measure_core (counters, RS flip-flops, stop logic, result multiplexer),
// gray_select, response_reg and the ropuf_ctrl sequencer on clk. Apart from the
// two ring banks, everything here is synthesizable. The measurement
// architecture, Gray code and default positions follow the original PUF
// proposal; the sequencer, the response packing and the ports are this
// design's own. CHIP_SEED, SPREAD_PS and
// JITTER_PS only shape the ring models (which chip is simulated).
//
// Interface: pulse start_single with a challenge on sel0/sel1, or start_sweep;
// each measured pair gives a one-cycle res_valid with res_idx, result and
// res_bits (and ovf, which counter overflowed); a sweep ends with a resp_done pulse and the full `response`.
// One measurement lasts 2^16 periods of the faster ring plus about
// SETTLE_CYCLES + 5 clk cycles.
`timescale 1ns / 1ps
module ropuf_top
  import ropuf_pkg::*;
#(
  parameter int unsigned N              = 150,
  parameter int unsigned W              = CNT_W,
  parameter int unsigned POS_FIRST      = 7,
  parameter int unsigned POS_LAST       = 8,
  parameter bit          GRAY_WINDOW    = 1'b0,
  parameter int unsigned SETTLE_CYCLES  = 8,
  parameter int unsigned TIMEOUT_CYCLES = 2 ** 20,
  parameter int unsigned CHIP_SEED      = 1,
  parameter int unsigned NOMINAL_PS     = 1000,
  parameter int unsigned SPREAD_PS      = 20,
  parameter int unsigned JITTER_PS      = 0,
  localparam int unsigned IW            = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WB            = POS_LAST - POS_FIRST + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_single,
  input  logic            start_sweep,
  input  logic [IW-1:0]   sel0,
  input  logic [IW-1:0]   sel1,
  output logic            busy,
  output logic            res_valid,
  output logic [IW-1:0]   res_idx,
  output logic [W-1:0]    result,
  output logic [WB-1:0]   res_bits,
  output logic [N*WB-1:0] response,
  output logic            resp_done,
  output logic [1:0]      ovf,
  output logic            timeout
);

  logic [N-1:0]  ro_set0, ro_set1;
  logic          ro_en;
  logic [IW-1:0] mux_sel0, mux_sel1;
  logic          f0, f1;
  logic          meas_clr, meas_en, meas_done;
  logic [W-1:0]  meas_result;
  logic          resp_we, resp_clear;

  ro_bank #(.N(N), .SEED(2 * CHIP_SEED), .NOMINAL_PS(NOMINAL_PS),
            .SPREAD_PS(SPREAD_PS), .JITTER_PS(JITTER_PS))
    u_set0 (.en(ro_en), .osc(ro_set0));
  ro_bank #(.N(N), .SEED(2 * CHIP_SEED + 1), .NOMINAL_PS(NOMINAL_PS),
            .SPREAD_PS(SPREAD_PS), .JITTER_PS(JITTER_PS))
    u_set1 (.en(ro_en), .osc(ro_set1));

  ro_mux #(.N(N)) u_mux0 (.ro(ro_set0), .sel(mux_sel0), .f_out(f0));
  ro_mux #(.N(N)) u_mux1 (.ro(ro_set1), .sel(mux_sel1), .f_out(f1));

  measure_core #(.W(W)) u_meas (
    .f0     (f0),
    .f1     (f1),
    .enable (meas_en),
    .clr    (meas_clr),
    .running(),
    .done   (meas_done),
    .ovf    (ovf),
    .res0   (),
    .res1   (),
    .result (meas_result)
  );

  ropuf_ctrl #(.N_PAIRS(N), .W(W), .SETTLE_CYCLES(SETTLE_CYCLES),
               .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_single(start_single),
    .start_sweep (start_sweep),
    .sel0_in     (sel0),
    .sel1_in     (sel1),
    .sel0        (mux_sel0),
    .sel1        (mux_sel1),
    .ro_en       (ro_en),
    .meas_clr    (meas_clr),
    .meas_en     (meas_en),
    .done_async  (meas_done),
    .result_async(meas_result),
    .busy        (busy),
    .res_valid   (res_valid),
    .res_idx     (res_idx),
    .res_value   (result),
    .resp_we     (resp_we),
    .resp_clear  (resp_clear),
    .resp_done   (resp_done),
    .timeout     (timeout)
  );

  gray_select #(.W(W), .POS_FIRST(POS_FIRST), .POS_LAST(POS_LAST), .GRAY_WINDOW(GRAY_WINDOW))
    u_gray (.value(result), .bits(res_bits));

  response_reg #(.N_PAIRS(N), .WB(WB)) u_resp (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (resp_clear),
    .we      (resp_we),
    .idx     (res_idx),
    .bits    (res_bits),
    .response(response)
  );

endmodule
