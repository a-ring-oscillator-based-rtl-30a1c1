// tb_ro_mux: checks the challenge multiplexer at its full size (150 inputs).
// Random input vectors and every select value are applied; the output must be
// the selected bit, and a select of N or more must give 0.
`timescale 1ns / 1ps
module tb_ro_mux;

  localparam int N  = 150;
  localparam int SW = $clog2(N);

  int checks = 0, failures = 0;

  logic [N-1:0]  ro;
  logic [SW-1:0] sel;
  logic          f_out;

  ro_mux #(.N(N)) dut (.ro(ro), .sel(sel), .f_out(f_out));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < N; k++) ro[k] = 1'($urandom);
      for (int s = 0; s < (1 << SW); s++) begin
        sel = SW'(s);
        #1;
        checks++;
        if (f_out !== ((s < N) ? ro[s] : 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL: sel=%0d out=%b", s, f_out);
        end
      end
    end
    // one-hot walk: only the selected ring may reach the output
    for (int s = 0; s < N; s++) begin
      ro  = '0;
      ro[s] = 1'b1;
      sel = SW'(s);
      #1;
      checks++;
      if (f_out !== 1'b1) failures++;
      sel = SW'((s + 1) % N);
      #1;
      checks++;
      if (f_out !== 1'b0) failures++;
    end
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
