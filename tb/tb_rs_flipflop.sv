// tb_rs_flipflop: checks the set-reset flip-flop: set, hold, reset, hold,
// set priority, and that Q-bar is always the inverse of Q.
`timescale 1ns / 1ps
module tb_rs_flipflop;

  int checks = 0, failures = 0;

  logic s = 1'b0, r = 1'b1;
  logic q, qn;

  rs_flipflop dut (.s(s), .r(r), .q(q), .qn(qn));

  task automatic apply(input logic s_i, input logic r_i, input logic q_exp, input string what);
    s = s_i;
    r = r_i;
    #1;
    checks++;
    if (q !== q_exp || qn !== ~q_exp) begin
      failures++;
      $display("FAIL: %s: q=%b qn=%b expected q=%b", what, q, qn, q_exp);
    end
  endtask

  initial begin
    apply(0, 1, 0, "reset");
    apply(0, 0, 0, "hold after reset");
    apply(1, 0, 1, "set");
    apply(0, 0, 1, "hold after set");
    apply(0, 1, 0, "reset after set");
    apply(0, 0, 0, "hold low");
    apply(1, 1, 1, "set wins over reset");
    apply(0, 0, 1, "hold after both");
    for (int i = 0; i < 50; i++) begin
      logic si, ri, exp;
      si  = 1'($urandom);
      ri  = 1'($urandom);
      exp = si ? 1'b1 : (ri ? 1'b0 : q);
      apply(si, ri, exp, "random sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
