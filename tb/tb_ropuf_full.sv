// tb_ropuf_full: the PUF at its full default size (2 x 150 rings, 16-bit
// counters, positions 7-8), taken through single-challenge measurements.
//
// All 300 ring models run during every measurement, as in the design. Three
// challenges are measured, including the first and the last ring of each set
// and a crossed pair. Each result is checked against
// floor(65535 * T_fast / T_slow) within one count, using the periods of the
// selected rings seen at the multiplexer outputs, and the Gray-code bits at
// positions 7-8 are recomputed here. The time from start to result must be
// 65535 fast-ring periods plus the fixed sequencing overhead.
`timescale 1ns / 1ps
module tb_ropuf_full;

  localparam int N = 150, W = 16, PF = 7, PL = 8, WB = 2, IW = $clog2(N);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic            clk = 1'b0, rst_n = 1'b0, start_single = 1'b0;
  logic [IW-1:0]   sel0 = '0, sel1 = '0, res_idx;
  logic            busy, res_valid, resp_done, timeout;
  logic [W-1:0]    result;
  logic [WB-1:0]   res_bits;
  logic [N*WB-1:0] response;
  logic [1:0]      ovf;

  // give the asynchronous reset a real falling edge
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #5 clk = ~clk;

  ropuf_top dut (
    .clk(clk), .rst_n(rst_n), .start_single(start_single), .start_sweep(1'b0),
    .sel0(sel0), .sel1(sel1), .busy(busy), .res_valid(res_valid), .res_idx(res_idx),
    .result(result), .res_bits(res_bits), .response(response), .resp_done(resp_done),
    .ovf(ovf), .timeout(timeout)
  );

  realtime t0 = 0, t1 = 0, p0 = 0, p1 = 0;
  always @(posedge dut.f0) begin p0 = $realtime - t0; t0 = $realtime; end
  always @(posedge dut.f1) begin p1 = $realtime - t1; t1 = $realtime; end

  task automatic measure(input int s0, input int s1);
    realtime t_start, t_end, tf, ts;
    int expected;
    logic [WB-1:0] g;
    sel0 = IW'(s0);
    sel1 = IW'(s1);
    start_single = 1'b1;
    @(negedge clk);
    start_single = 1'b0;
    t_start = $realtime;
    wait (res_valid);
    t_end = $realtime;
    tf = (p0 < p1) ? p0 : p1;
    ts = (p0 < p1) ? p1 : p0;
    expected = int'($floor(65535.0 * tf / ts));
    $display("challenge (%0d,%0d): T0=%0.3f ns T1=%0.3f ns result=%h expected~%h bits=%b",
             s0, s1, p0, p1, result, expected, res_bits);
    check(int'(result) >= expected - 1 && int'(result) <= expected + 1, "result vs period ratio");
    check(ovf == ((p0 < p1) ? 2'b01 : 2'b10), "the faster ring's counter overflowed");
    for (int p = PF; p <= PL; p++) g[PL - p] = result[W - p] ^ result[W - p + 1];
    check(res_bits == g, "Gray bits at positions 7-8");
    check(res_idx == IW'(s0), "pair index");
    // settle (8) + synchroniser (2..3) + capture (1) + start (1) cycles
    check((t_end - t_start) >= 65535.0 * tf && (t_end - t_start) <= 65535.0 * tf + 20 * 10.0,
          $sformatf("measurement time %0.1f ns", t_end - t_start));
    check(!timeout, "no timeout");
    wait (!busy);
    @(negedge clk);
  endtask

  initial begin
    #33 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    measure(0, 0);
    measure(149, 149);
    measure(17, 88);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
