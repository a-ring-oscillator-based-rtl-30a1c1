// tb_ro_counter: checks the 16-bit ring-clocked counter.
//
// Counts are compared with an edge count kept by the testbench: counting only
// while CE is high, asynchronous clear without a clock edge, the overflow flag
// exactly at 0xFFFF and not before, and wrap to 0 if CE stays high.
`timescale 1ns / 1ps
module tb_ro_counter;

  localparam int W = 16;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic         c = 1'b0, ce = 1'b0, clr = 1'b0;
  logic [W-1:0] q;
  logic         of;

  ro_counter #(.W(W)) dut (.c(c), .ce(ce), .clr(clr), .q(q), .of(of));

  task automatic pulses(input int n);
    repeat (n) begin
      #2 c = 1'b1;
      #2 c = 1'b0;
    end
  endtask

  int of_early = 0;

  initial begin
    #1 clr = 1'b1;
    #2;
    check(q == 0 && !of, "cleared");
    clr = 1'b0;
    pulses(10);
    check(q == 0, "no count with CE low");
    ce = 1'b1;
    pulses(37);
    check(q == 37, $sformatf("37 counts, got %0d", q));
    ce = 1'b0;
    pulses(5);
    check(q == 37, "holds with CE low");
    clr = 1'b1;
    #1;
    check(q == 0, "asynchronous clear without clock");
    clr = 1'b0;
    ce  = 1'b1;
    for (int i = 0; i < (1 << W) - 2; i++) begin
      pulses(1);
      if (of) of_early++;
    end
    check(of_early == 0, "no overflow before 0xFFFF");
    check(q == 16'hFFFE && !of, "0xFFFE after 65534 counts");
    pulses(1);
    check(q == 16'hFFFF && of, "overflow flag at 0xFFFF");
    pulses(1);
    check(q == 0 && !of, "wraps to 0 if CE stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
