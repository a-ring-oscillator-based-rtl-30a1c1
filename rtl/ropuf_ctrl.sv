// ropuf_ctrl: sequencer that runs measurements and builds the PUF response.
//
// Runs in the system clock domain. One measurement of challenge (sel0, sel1):
//   SETTLE  the challenge is applied to the ring multiplexers and the
//           measurement core is held in clear, with enable low, for
//           SETTLE_CYCLES cycles, so multiplexer glitches cannot count;
//   RUN     clear is released and enable raised; the core's asynchronous
//           `done` is synchronised and awaited;
//   CAPTURE the core's result, now frozen, is latched;
//   NEXT    res_valid pulses with the pair index and value; in a sweep the
//           response register is written and the next pair (k, k) follows.
// start_single measures the external challenge once; start_sweep measures
// pairs 0..N_PAIRS-1 and pulses resp_done at the end. Both ring sets are
// enabled for the whole operation. If `done` does not come within
// TIMEOUT_CYCLES (a ring that does not run), the operation ends with `timeout`
// set until the next start. The sequencer is this design's own: the original proposal
// only fixes what one measurement does.
//
// Reset is asynchronous, active low. Starts are ignored while busy.
`timescale 1ns / 1ps
module ropuf_ctrl
  import ropuf_pkg::*;
#(
  parameter int unsigned N_PAIRS        = 150,
  parameter int unsigned W              = CNT_W,
  parameter int unsigned SETTLE_CYCLES  = 8,
  parameter int unsigned TIMEOUT_CYCLES = 2 ** 20,
  localparam int unsigned IW            = (N_PAIRS > 1) ? $clog2(N_PAIRS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_single,
  input  logic          start_sweep,
  input  logic [IW-1:0] sel0_in,
  input  logic [IW-1:0] sel1_in,
  // to the ring multiplexers and the measurement core
  output logic [IW-1:0] sel0,
  output logic [IW-1:0] sel1,
  output logic          ro_en,
  output logic          meas_clr,
  output logic          meas_en,
  input  logic          done_async,
  input  logic [W-1:0]  result_async,
  // status and results
  output logic          busy,
  output logic          res_valid,
  output logic [IW-1:0] res_idx,
  output logic [W-1:0]  res_value,
  output logic          resp_we,
  output logic          resp_clear,
  output logic          resp_done,
  output logic          timeout
);

  ctrl_state_t state;
  logic        sweep;
  logic        done_sync;
  logic [31:0] cnt;

  sync2 u_sync_done (.clk(clk), .rst_n(rst_n), .d(done_async), .q(done_sync));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      sweep      <= 1'b0;
      sel0       <= '0;
      sel1       <= '0;
      ro_en      <= 1'b0;
      cnt        <= '0;
      res_idx    <= '0;
      res_value  <= '0;
      resp_clear <= 1'b0;
      resp_done  <= 1'b0;
      timeout    <= 1'b0;
    end else begin
      resp_clear <= 1'b0;
      resp_done  <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start_sweep) begin
            sweep      <= 1'b1;
            sel0       <= '0;
            sel1       <= '0;
            res_idx    <= '0;
            resp_clear <= 1'b1;
          end else if (start_single) begin
            sweep   <= 1'b0;
            sel0    <= sel0_in;
            sel1    <= sel1_in;
            res_idx <= sel0_in;
          end
          if (start_sweep || start_single) begin
            ro_en   <= 1'b1;
            timeout <= 1'b0;
            cnt     <= '0;
            state   <= ST_SETTLE;
          end
        end
        ST_SETTLE: begin
          if (cnt >= SETTLE_CYCLES - 1) begin
            cnt   <= '0;
            state <= ST_RUN;
          end else begin
            cnt <= cnt + 1;
          end
        end
        ST_RUN: begin
          if (done_sync) begin
            state <= ST_CAPTURE;
          end else if (cnt >= TIMEOUT_CYCLES - 1) begin
            timeout <= 1'b1;
            ro_en   <= 1'b0;
            sweep   <= 1'b0;
            state   <= ST_IDLE;
          end else begin
            cnt <= cnt + 1;
          end
        end
        ST_CAPTURE: begin
          res_value <= result_async;
          state     <= ST_NEXT;
        end
        ST_NEXT: begin
          cnt <= '0;
          if (sweep && 32'(res_idx) < N_PAIRS - 1) begin
            res_idx <= res_idx + 1'b1;
            sel0    <= res_idx + 1'b1;
            sel1    <= res_idx + 1'b1;
            state   <= ST_SETTLE;
          end else begin
            resp_done <= sweep;
            sweep     <= 1'b0;
            ro_en     <= 1'b0;
            state     <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy      = (state != ST_IDLE);
  assign meas_clr  = (state == ST_SETTLE) || (state == ST_IDLE);
  assign meas_en   = (state == ST_RUN);
  assign res_valid = (state == ST_NEXT);
  assign resp_we   = (state == ST_NEXT) && sweep;

  initial begin
    assert (SETTLE_CYCLES >= 3)
      else $error("ropuf_ctrl: SETTLE_CYCLES must cover the done synchroniser (>= 3)");
  end

endmodule
