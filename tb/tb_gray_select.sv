// tb_gray_select: checks Gray conversion and position selection for every
// position range of the evaluated configurations (6-8, 7-8, 7-9, 7-10, 8-9).
// The expected bits are built here bit by bit: position p is bit 16-p of the
// value, and Gray bit i is b[i] xor b[i+1] (b[16] = 0). All 65536 values are
// tried, and for each step of one count the number of changed Gray bits in the
// whole word must be exactly one. The window-only variant (Gray code of the
// selected bits alone) is checked for positions 7-8.
`timescale 1ns / 1ps
module tb_gray_select;

  localparam int W = 16;

  int checks = 0, failures = 0;

  logic [W-1:0] value;
  logic [2:0] b68;
  logic [1:0] b78;
  logic [2:0] b79;
  logic [3:0] b710;
  logic [1:0] b89;
  logic [W-1:0] full;
  logic [1:0] w78;

  gray_select #(.W(W), .POS_FIRST(6), .POS_LAST(8))  u68  (.value(value), .bits(b68));
  gray_select #(.W(W))                               u78  (.value(value), .bits(b78));
  gray_select #(.W(W), .POS_FIRST(7), .POS_LAST(9))  u79  (.value(value), .bits(b79));
  gray_select #(.W(W), .POS_FIRST(7), .POS_LAST(10)) u710 (.value(value), .bits(b710));
  gray_select #(.W(W), .POS_FIRST(8), .POS_LAST(9))  u89  (.value(value), .bits(b89));
  gray_select #(.W(W), .POS_FIRST(1), .POS_LAST(16)) uall (.value(value), .bits(full));
  gray_select #(.W(W), .GRAY_WINDOW(1'b1))           uw78 (.value(value), .bits(w78));

  function automatic logic gbit(input logic [W-1:0] v, input int pos);
    int i;
    logic hi;
    i  = W - pos;
    hi = (i == W - 1) ? 1'b0 : v[i+1];
    return v[i] ^ hi;
  endfunction

  function automatic logic [3:0] expect_bits(input logic [W-1:0] v, input int pf, input int pl);
    logic [3:0] r;
    r = '0;
    for (int p = pf; p <= pl; p++) r = {r[2:0], gbit(v, p)};
    return r;
  endfunction

  task automatic cmp(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s value=%h got=%b exp=%b", what, value, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] prev;
    int step_bad;
    step_bad = 0;
    for (int v = 0; v < (1 << W); v++) begin
      value = W'(v);
      #1;
      cmp(4'(b68),  expect_bits(value, 6, 8),  "6-8");
      cmp(4'(b78),  expect_bits(value, 7, 8),  "7-8");
      cmp(4'(b79),  expect_bits(value, 7, 9),  "7-9");
      cmp(b710,     expect_bits(value, 7, 10), "7-10");
      cmp(4'(b89),  expect_bits(value, 8, 9),  "8-9");
      // window-only conversion: binary bits 9..8 -> Gray of that 2-bit number
      cmp(4'(w78), 4'({value[9], value[9] ^ value[8]}), "7-8 window-only Gray");
      if (v > 0 && $countones(full ^ prev) != 1) step_bad++;
      prev = full;
    end
    checks++;
    if (step_bad != 0) begin
      failures++;
      $display("FAIL: %0d steps changed more than one Gray bit", step_bad);
    end
    // the example value 0xEB12: positions 7-8 are bits 9..8 = 11 -> Gray 1,0
    value = 16'hEB12;
    #1;
    cmp(4'(b78), 4'b0010, "example 0xEB12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
