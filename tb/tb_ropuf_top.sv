// tb_ropuf_top: end-to-end test of the ring-oscillator PUF.
//
// Two PUF instances with different CHIP_SEED stand for two FPGAs, each with
// 6 ring pairs (the ring models and all logic as in the full design, fewer
// rings). A third instance with a very short timeout checks the abort path.
// For every measured pair the testbench takes the periods of the two selected
// rings from their edges and checks the result against
// floor(65535 * T_fast / T_slow) within one count, checks which counter
// overflowed, and recomputes the Gray-code bits at positions 7-8. It checks
// the assembled response of each sweep, that a repeated sweep on the same chip
// gives the same response, and that the two chips give different responses.
// Every mechanism (single challenge, sweep, overflow of counter 0 and of
// counter 1, response complete, timeout) must occur at least once.
`timescale 1ns / 1ps
module tb_ropuf_top;

  localparam int N = 6, W = 16, PF = 7, PL = 8, WB = PL - PF + 1, IW = $clog2(N);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0, rst_n = 1'b0;
  // give the asynchronous reset a real falling edge
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- chip A / B
  logic            st_single_a = 0, st_sweep_a = 0, st_sweep_b = 0, st_single_t = 0;
  logic [IW-1:0]   sel0_a = '0, sel1_a = '0;
  logic            busy_a, valid_a, done_a, tmo_a;
  logic            busy_b, valid_b, done_b, tmo_b;
  logic            busy_t, valid_t, done_t, tmo_t;
  logic [IW-1:0]   idx_a, idx_b, idx_t;
  logic [W-1:0]    res_a, res_b, res_t;
  logic [WB-1:0]   bits_a, bits_b, bits_t;
  logic [N*WB-1:0] resp_a, resp_b, resp_t;
  logic [1:0]      ovf_a, ovf_b, ovf_t;

  ropuf_top #(.N(N), .CHIP_SEED(1)) dut_a (
    .clk(clk), .rst_n(rst_n), .start_single(st_single_a), .start_sweep(st_sweep_a),
    .sel0(sel0_a), .sel1(sel1_a), .busy(busy_a), .res_valid(valid_a), .res_idx(idx_a),
    .result(res_a), .res_bits(bits_a), .response(resp_a), .resp_done(done_a), .ovf(ovf_a),
    .timeout(tmo_a)
  );
  ropuf_top #(.N(N), .CHIP_SEED(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .start_single(1'b0), .start_sweep(st_sweep_b),
    .sel0('0), .sel1('0), .busy(busy_b), .res_valid(valid_b), .res_idx(idx_b),
    .result(res_b), .res_bits(bits_b), .response(resp_b), .resp_done(done_b), .ovf(ovf_b),
    .timeout(tmo_b)
  );
  ropuf_top #(.N(N), .CHIP_SEED(3), .TIMEOUT_CYCLES(50)) dut_t (
    .clk(clk), .rst_n(rst_n), .start_single(st_single_t), .start_sweep(1'b0),
    .sel0('0), .sel1('0), .busy(busy_t), .res_valid(valid_t), .res_idx(idx_t),
    .result(res_t), .res_bits(bits_t), .response(resp_t), .resp_done(done_t), .ovf(ovf_t),
    .timeout(tmo_t)
  );

  // ----------------------------------------------------- ring period monitors
  realtime ta0 = 0, ta1 = 0, pa0 = 0, pa1 = 0, tb0 = 0, tb1 = 0, pb0 = 0, pb1 = 0;
  always @(posedge dut_a.f0) begin pa0 = $realtime - ta0; ta0 = $realtime; end
  always @(posedge dut_a.f1) begin pa1 = $realtime - ta1; ta1 = $realtime; end
  always @(posedge dut_b.f0) begin pb0 = $realtime - tb0; tb0 = $realtime; end
  always @(posedge dut_b.f1) begin pb1 = $realtime - tb1; tb1 = $realtime; end

  // ------------------------------------------------------------ mechanisms
  int n_single = 0, n_sweep = 0, n_ovf0 = 0, n_ovf1 = 0, n_resp_done = 0, n_timeout = 0;
  int n_pairs = 0;

  function automatic logic [WB-1:0] gray_bits(input logic [W-1:0] v);
    logic [WB-1:0] r;
    for (int p = PF; p <= PL; p++) begin
      int i;
      i = W - p;
      r[PL - p] = v[i] ^ ((i == W - 1) ? 1'b0 : v[i+1]);
    end
    return r;
  endfunction

  task automatic check_pair(input string chip, input logic [W-1:0] res, input logic [1:0] ovf,
                            input logic [WB-1:0] bits, input realtime p0, input realtime p1);
    int expected;
    realtime tf, ts;
    tf = (p0 < p1) ? p0 : p1;
    ts = (p0 < p1) ? p1 : p0;
    expected = int'($floor(65535.0 * tf / ts));
    check(int'(res) >= expected - 1 && int'(res) <= expected + 1,
          $sformatf("%s result %0d vs %0d (T0 %0.3f T1 %0.3f)", chip, res, expected, p0, p1));
    if (p0 < p1) begin
      check(ovf == 2'b01, $sformatf("%s counter 0 overflowed", chip));
      n_ovf0++;
    end else begin
      check(ovf == 2'b10, $sformatf("%s counter 1 overflowed", chip));
      n_ovf1++;
    end
    check(bits == gray_bits(res), $sformatf("%s Gray bits of %h", chip, res));
    n_pairs++;
  endtask

  logic [N*WB-1:0] model_a, model_b;
  always @(posedge clk) begin
    if (valid_a) begin
      check_pair("A", res_a, ovf_a, bits_a, pa0, pa1);
      if (busy_a) model_a[idx_a*WB +: WB] <= gray_bits(res_a);
    end
    if (valid_b) begin
      check_pair("B", res_b, ovf_b, bits_b, pb0, pb1);
      model_b[idx_b*WB +: WB] <= gray_bits(res_b);
    end
    if (done_a || done_b) n_resp_done++;
    if (valid_t) check(1'b0, "timed-out instance must not report a result");
  end

  logic [N*WB-1:0] resp_a_first;
  int              hd_inter;

  initial begin
    #33 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // single challenge on chip A, pair (2, 4)
    sel0_a = IW'(2);
    sel1_a = IW'(4);
    st_single_a = 1'b1;
    st_single_t = 1'b1;
    @(negedge clk);
    st_single_a = 1'b0;
    st_single_t = 1'b0;
    wait (valid_a);
    @(negedge clk);
    check(idx_a == IW'(2), "single challenge reported with its index");
    n_single++;
    check(tmo_t && !busy_t, "short-timeout instance aborted");
    if (tmo_t) n_timeout++;
    wait (!busy_a);
    @(negedge clk);
    // sweep on both chips
    st_sweep_a = 1'b1;
    st_sweep_b = 1'b1;
    @(negedge clk);
    st_sweep_a = 1'b0;
    st_sweep_b = 1'b0;
    fork
      wait (done_a);
      wait (done_b);
    join
    repeat (2) @(negedge clk);
    n_sweep++;
    check(resp_a == model_a, $sformatf("chip A response %h vs %h", resp_a, model_a));
    check(resp_b == model_b, $sformatf("chip B response %h vs %h", resp_b, model_b));
    resp_a_first = resp_a;
    hd_inter = $countones(resp_a ^ resp_b);
    $display("chip A response %b", resp_a);
    $display("chip B response %b", resp_b);
    $display("inter-chip Hamming distance %0d of %0d bits", hd_inter, N * WB);
    check(hd_inter > 0, "two chips give different responses");
    // repeated sweep on chip A
    st_sweep_a = 1'b1;
    @(negedge clk);
    st_sweep_a = 1'b0;
    wait (done_a);
    repeat (2) @(negedge clk);
    n_sweep++;
    check(resp_a == resp_a_first, "repeated sweep on one chip reproduces its response");
    // mechanisms
    check(n_single > 0, "single-challenge mode used");
    check(n_sweep > 0, "sweep mode used");
    check(n_ovf0 > 0, $sformatf("counter 0 ended a measurement (%0d times)", n_ovf0));
    check(n_ovf1 > 0, $sformatf("counter 1 ended a measurement (%0d times)", n_ovf1));
    check(n_resp_done >= 2, "response completed");
    check(n_timeout > 0, "timeout taken");
    check(n_pairs == 1 + 3 * N, $sformatf("%0d pair results", n_pairs));
    $display("mechanisms: single=%0d sweep=%0d ovf0=%0d ovf1=%0d resp_done=%0d timeout=%0d",
             n_single, n_sweep, n_ovf0, n_ovf1, n_resp_done, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
