// tb_measure_core: checks the differential frequency measurement.
//
// Two testbench clocks with known periods stand for the selected rings. For
// each case the expected result is floor(65535 * T_fast / T_slow), computed
// here from the periods alone; the core's result may differ from it by one
// count, the phase of the two rings at start and stop. Also checked: the counter that overflowed
// holds 0xFFFF and is reported in ovf, running falls and both counters stop
// (no further change), and the measurement lasts 65535 fast periods.
`timescale 1ns / 1ps
module tb_measure_core;

  localparam int W = 16;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic         f0 = 1'b0, f1 = 1'b0, enable = 1'b0, clr = 1'b1;
  logic         running, done;
  logic [1:0]   ovf;
  logic [W-1:0] res0, res1, result;

  measure_core #(.W(W)) dut (
    .f0(f0), .f1(f1), .enable(enable), .clr(clr), .running(running), .done(done),
    .ovf(ovf), .res0(res0), .res1(res1), .result(result)
  );

  realtime half0 = 5.0, half1 = 5.1;
  always #(half0) f0 = ~f0;
  always #(half1) f1 = ~f1;

  int n_ovf0 = 0, n_ovf1 = 0;

  task automatic run_case(input realtime h0, input realtime h1);
    realtime t_start, t_done, t_fast, t_slow;
    int      expected;
    logic [W-1:0] r_hold;
    half0 = h0;
    half1 = h1;
    enable = 1'b0;
    clr = 1'b1;
    #50;
    check(!done && res0 == 0 && res1 == 0, "clear resets counters and flip-flops");
    clr = 1'b0;
    #7.3;
    enable = 1'b1;
    t_start = $realtime;
    wait (done);
    t_done = $realtime;
    check(!running, "running falls when a counter overflows");
    t_fast = 2.0 * ((h0 < h1) ? h0 : h1);
    t_slow = 2.0 * ((h0 < h1) ? h1 : h0);
    expected = int'($floor(65535.0 * t_fast / t_slow));
    #100;
    if (h0 < h1) begin
      check(ovf == 2'b01 && res0 == 16'hFFFF, "faster counter 0 overflowed at 0xFFFF");
      n_ovf0++;
    end else if (h1 < h0) begin
      check(ovf == 2'b10 && res1 == 16'hFFFF, "faster counter 1 overflowed at 0xFFFF");
      n_ovf1++;
    end
    check(int'(result) >= expected - 1 && int'(result) <= expected + 1,
          $sformatf("result %0d vs expected %0d (T %0.2f/%0.2f ns)", result, expected,
                    2.0 * h0, 2.0 * h1));
    check((t_done - t_start) >= 65534.0 * t_fast && (t_done - t_start) <= 65536.0 * t_fast,
          $sformatf("measurement lasted %0.1f ns = 65535 fast periods", t_done - t_start));
    r_hold = result;
    #1000;
    check(result == r_hold && done, "counters stay stopped after the overflow");
    enable = 1'b0;
  endtask

  initial begin
    #20;
    run_case(5.0, 5.1);
    run_case(5.3, 5.0);
    run_case(5.0, 5.25);
    run_case(4.9, 5.6);
    run_case(6.0, 5.95);
    check(n_ovf0 > 0 && n_ovf1 > 0, "both counters ended a measurement at least once");
    // enable low: nothing counts
    clr = 1'b1;
    #20 clr = 1'b0;
    #500;
    check(res0 == 0 && res1 == 0 && !done, "no counting without enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
