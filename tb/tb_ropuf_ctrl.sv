// tb_ropuf_ctrl: checks the sequencer against a small model of the
// measurement core kept in this testbench.
//
// The model raises `done` (asynchronously, off the clock grid) a set time after
// enable rises and offers a result derived from the challenge; clear drops it.
// Checked: single measurement of an external challenge; a sweep over 5 pairs
// giving pairs 0..4 in order with resp_we for each and one resp_done; the
// multiplexers never change and the core never runs while clear is low and
// enable is high in the wrong state; SETTLE_CYCLES of clear before each run;
// the cycle count of one measurement; and a timeout when done never comes.
`timescale 1ns / 1ps
module tb_ropuf_ctrl;

  localparam int NP = 5, W = 16, IW = $clog2(NP), SETTLE = 6, TMO = 200;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic          clk = 1'b0, rst_n = 1'b0, start_single = 1'b0, start_sweep = 1'b0;
  logic [IW-1:0] sel0_in = '0, sel1_in = '0, sel0, sel1, res_idx;
  logic          ro_en, meas_clr, meas_en, busy, res_valid, resp_we, resp_clear;
  logic          resp_done, timeout;
  logic [W-1:0]  res_value;
  logic          done_async = 1'b0;
  logic [W-1:0]  result_async = '0;

  ropuf_ctrl #(.N_PAIRS(NP), .W(W), .SETTLE_CYCLES(SETTLE), .TIMEOUT_CYCLES(TMO)) dut (
    .clk(clk), .rst_n(rst_n), .start_single(start_single), .start_sweep(start_sweep),
    .sel0_in(sel0_in), .sel1_in(sel1_in), .sel0(sel0), .sel1(sel1), .ro_en(ro_en),
    .meas_clr(meas_clr), .meas_en(meas_en), .done_async(done_async),
    .result_async(result_async), .busy(busy), .res_valid(res_valid), .res_idx(res_idx),
    .res_value(res_value), .resp_we(resp_we), .resp_clear(resp_clear),
    .resp_done(resp_done), .timeout(timeout)
  );

  // give the asynchronous reset a real falling edge
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #5 clk = ~clk;

  // measurement core model
  bit   core_dead = 1'b0;
  realtime meas_ns = 333.3;
  always @(posedge meas_clr) begin
    done_async   = 1'b0;
    result_async = '0;
  end
  always @(posedge meas_en) begin
    if (!core_dead) begin
      #(meas_ns);
      result_async = W'(16'hA000 + 16'(sel0) * 16'h0101 + 16'(sel1));
      done_async   = 1'b1;
    end
  end

  // protocol monitors
  int sel_change_bad = 0, clr_cycles = 0, settle_bad = 0, en_no_ro = 0;
  logic [IW-1:0] sel0_q, sel1_q;
  always @(posedge clk) begin
    if (meas_en && (sel0 != sel0_q || sel1 != sel1_q)) sel_change_bad++;
    if (meas_en && !ro_en) en_no_ro++;
    if (meas_clr && busy) clr_cycles++;
    else if (meas_en && $past(meas_clr) && clr_cycles != 0 && clr_cycles < SETTLE) settle_bad++;
    if (!meas_clr) clr_cycles = 0;
    sel0_q <= sel0;
    sel1_q <= sel1;
  end

  int n_valid = 0, n_we = 0, n_done = 0, n_clear = 0;
  int exp_idx = 0;
  bit in_sweep = 1'b0;
  always @(posedge clk) begin
    if (res_valid) begin
      n_valid++;
      if (in_sweep) begin
        check(res_idx == IW'(exp_idx), $sformatf("sweep pair %0d in order", exp_idx));
        check(res_value == W'(16'hA000 + 16'(exp_idx) * 16'h0102),
              $sformatf("sweep pair %0d value %h", exp_idx, res_value));
        exp_idx++;
      end
    end
    if (resp_we) n_we++;
    if (resp_done) n_done++;
    if (resp_clear) n_clear++;
  end

  initial begin
    longint t0, t1;
    #23 rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !ro_en && meas_clr && !meas_en, "idle after reset");
    // single measurement
    sel0_in = IW'(3);
    sel1_in = IW'(1);
    start_single = 1'b1;
    @(negedge clk);
    start_single = 1'b0;
    t0 = $time;
    wait (res_valid);
    t1 = $time;
    @(negedge clk);
    check(res_idx == IW'(3) && dut.res_value == 16'hA000 + 16'h0303 + 16'h1,
          $sformatf("single result %h", dut.res_value));
    check(n_we == 0, "single measurement does not write the response");
    // settle (SETTLE) + run until done is synchronised (34 + 2..3) + capture
    check((t1 - t0) / 10 >= SETTLE + 34 + 2 && (t1 - t0) / 10 <= SETTLE + 34 + 5,
          $sformatf("single measurement took %0d cycles", (t1 - t0) / 10));
    repeat (2) @(negedge clk);
    check(!busy && !ro_en, "idle again after single");
    // sweep
    in_sweep = 1'b1;
    n_valid  = 0;
    start_sweep = 1'b1;
    @(negedge clk);
    start_sweep = 1'b0;
    wait (resp_done);
    repeat (2) @(negedge clk);
    in_sweep = 1'b0;
    check(exp_idx == NP && n_valid == NP, $sformatf("%0d pairs measured", n_valid));
    check(n_we == NP, "one response write per pair");
    check(n_clear == 1, "response cleared once at sweep start");
    check(n_done == 1, "one resp_done");
    check(!busy && !ro_en && !timeout, "idle after sweep");
    // timeout
    core_dead = 1'b1;
    start_single = 1'b1;
    @(negedge clk);
    start_single = 1'b0;
    repeat (SETTLE + TMO + 10) @(negedge clk);
    check(timeout && !busy && !ro_en, "timeout when done never comes");
    core_dead = 1'b0;
    start_single = 1'b1;
    @(negedge clk);
    start_single = 1'b0;
    check(!timeout, "timeout cleared by the next start");
    wait (res_valid);
    @(negedge clk);
    check(sel_change_bad == 0, "challenge stable while enabled");
    check(settle_bad == 0, "clear held SETTLE_CYCLES before enable");
    check(en_no_ro == 0, "rings enabled whenever the core is enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
