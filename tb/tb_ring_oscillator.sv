// tb_ring_oscillator: checks the ring oscillator model.
//
// A ring with stage delays 1000/1100/900/1000/1000 ps must toggle every
// 5000 ps (10 ns period) while enabled, hold low and make no edges while
// disabled, and restart when enabled again. A second ring with jitter must keep
// every half period within +/-JITTER_PS of nominal and not be perfectly regular.
`timescale 1ns / 1ps
module tb_ring_oscillator;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic en = 1'b0;
  logic osc, osc_j;

  ring_oscillator #(.STAGE_PS('{1000, 1100, 900, 1000, 1000})) u_ro (.en(en), .osc(osc));
  ring_oscillator #(.STAGE_PS('{1000, 1000, 1000, 1000, 1000}), .JITTER_PS(50))
    u_roj (.en(en), .osc(osc_j));

  realtime t_last = 0, t_j = 0;
  int      edges = 0, edges_j = 0, bad_half = 0, bad_j = 0, distinct_j = 0;
  realtime first_half_j = 0;

  always @(osc) begin
    if (edges > 0 && en && ($realtime - t_last) != 5.0) bad_half++;
    t_last = $realtime;
    edges++;
  end

  always @(osc_j) begin
    if (edges_j > 0 && en) begin
      realtime h;
      h = $realtime - t_j;
      if (h < 4.9495 || h > 5.0505) bad_j++;
      if (first_half_j == 0) first_half_j = h;
      else if (h != first_half_j) distinct_j++;
    end
    t_j = $realtime;
    edges_j++;
  end

  initial begin
    #10;
    edges = 0;
    edges_j = 0;
    #100;
    check(osc == 1'b0 && edges == 0, "ring idle and low while disabled");
    edges = 0;
    edges_j = 0;
    en = 1'b1;
    #1002;  // 100 periods
    check(bad_half == 0, "every half period is 5000 ps");
    check(edges >= 199 && edges <= 201, $sformatf("200 edges in 1 us, got %0d", edges));
    check(bad_j == 0, "jittered half periods within +/-50 ps");
    check(distinct_j > 0, "jittered ring is not perfectly regular");
    en = 1'b0;
    #20;
    edges = 0;
    #200;
    check(osc == 1'b0 && edges == 0, "ring stops low when disabled");
    en = 1'b1;
    bad_half = 0;
    edges = 0;
    #500;
    check(bad_half == 0 && edges >= 99, "ring restarts with the same period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
