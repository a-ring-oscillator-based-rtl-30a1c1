// tb_response_reg: checks the response register at full size (150 pairs x 2).
// Random pair bits are written in random order against a reference array kept
// here; writes without `we`, with an out-of-range index, and `clear` are
// checked too.
`timescale 1ns / 1ps
module tb_response_reg;

  localparam int NP = 150, WB = 2, IW = $clog2(NP);

  int checks = 0, failures = 0;

  logic             clk = 1'b0, rst_n = 1'b0, clear = 1'b0, we = 1'b0;
  logic [IW-1:0]    idx = '0;
  logic [WB-1:0]    bits = '0;
  logic [NP*WB-1:0] response, model;

  response_reg #(.N_PAIRS(NP), .WB(WB)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .we(we), .idx(idx), .bits(bits),
    .response(response)
  );

  // give the asynchronous reset a real falling edge
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    model = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(response == '0, "reset value");
    for (int n = 0; n < 600; n++) begin
      int k;
      k    = $urandom_range(NP - 1);
      idx  = IW'(k);
      bits = WB'($urandom);
      we   = 1'($urandom_range(3) != 0);
      if (we) model[k*WB +: WB] = bits;
      @(negedge clk);
      check(response == model, $sformatf("after write %0d", n));
    end
    we  = 1'b1;
    idx = IW'(NP + 3);
    bits = 2'b11;
    @(negedge clk);
    check(response == model, "out-of-range index ignored");
    we = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(response == '0, "clear");
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
