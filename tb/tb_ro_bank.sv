// tb_ro_bank: checks a bank of ring oscillator models.
//
// An 8-ring bank is enabled and each ring's period is measured from its edges.
// Every period must lie within 2*5*(NOMINAL_PS +/- SPREAD_PS), the rings must
// not all be equal, a second bank with another seed must differ from the first,
// the same seed must reproduce the same periods, and disabling must stop all.
`timescale 1ns / 1ps
module tb_ro_bank;

  localparam int N = 8;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic en = 1'b0;
  logic [N-1:0] osc_a, osc_b, osc_c;

  ro_bank #(.N(N), .SEED(3), .NOMINAL_PS(1000), .SPREAD_PS(20)) u_a (.en(en), .osc(osc_a));
  ro_bank #(.N(N), .SEED(4), .NOMINAL_PS(1000), .SPREAD_PS(20)) u_b (.en(en), .osc(osc_b));
  ro_bank #(.N(N), .SEED(3), .NOMINAL_PS(1000), .SPREAD_PS(20)) u_c (.en(en), .osc(osc_c));

  realtime per_a [N], per_b [N], per_c [N];
  int      edges_total = 0;

  for (genvar i = 0; i < N; i++) begin : g_meas
    realtime ta = 0, tb = 0, tc = 0;
    always @(posedge osc_a[i]) begin
      if (ta != 0) per_a[i] = $realtime - ta;
      ta = $realtime;
      edges_total++;
    end
    always @(posedge osc_b[i]) begin
      if (tb != 0) per_b[i] = $realtime - tb;
      tb = $realtime;
    end
    always @(posedge osc_c[i]) begin
      if (tc != 0) per_c[i] = $realtime - tc;
      tc = $realtime;
    end
  end

  initial begin
    int distinct, diff_seed;
    #50;
    check(osc_a == '0 && edges_total == 0, "bank idle while disabled");
    en = 1'b1;
    #500;
    distinct  = 0;
    diff_seed = 0;
    for (int i = 0; i < N; i++) begin
      check(per_a[i] >= 9.8 && per_a[i] <= 10.2,
            $sformatf("ring %0d period %0.3f ns within 10 ns +/- 2%%", i, per_a[i]));
      check(per_c[i] == per_a[i], $sformatf("ring %0d reproducible with the same seed", i));
      if (i > 0 && per_a[i] != per_a[0]) distinct++;
      if (per_b[i] != per_a[i]) diff_seed++;
    end
    check(distinct > 0, "rings of one bank differ");
    check(diff_seed > N / 2, "another seed gives other periods");
    en = 1'b0;
    #20;
    edges_total = 0;
    #100;
    check(osc_a == '0 && edges_total == 0, "bank stops when disabled");
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
