// tb_ropuf_eval: PUF quality evaluation on simulated chips.
//
// Three PUF instances (CHIP_SEED 1..3, 10 ring pairs each, ring jitter
// 100 ps per half period) each run REPS sweeps. From the raw counter values
// the testbench forms, for every bit selection 6-8, 7-8, 7-9, 7-10 and 8-9 and
// for the noisy low positions 13-16, the Gray-coded responses and computes
//   HD_intra = mean over chips and repeats of HD(first response, repeat) / bits,
//              and again against the bitwise majority of the repeats
//   HD_inter = mean over chip pairs of HD(first response i, first response j) / bits
// in percent. Checked: the hardware response (positions 7-8) equals the one
// built here from the raw values; HD_inter exceeds HD_intra for 7-8; the
// LSB-side selection 13-16 is less stable than 7-8.
`timescale 1ns / 1ps
module tb_ropuf_eval;

  localparam int N = 10, W = 16, CHIPS = 3, REPS = 3, IW = $clog2(N);
  localparam int NSEL = 6;
  localparam int SEL_F [NSEL] = '{6, 7, 7, 7, 8, 13};
  localparam int SEL_L [NSEL] = '{8, 8, 9, 10, 9, 16};

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  // give the asynchronous reset a real falling edge
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #5 clk = ~clk;

  logic [W-1:0] raw [CHIPS][REPS][N];
  logic [2*N-1:0] hw_resp [CHIPS][REPS];
  int rep = 0;
  logic [CHIPS-1:0] done_v;

  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    logic            busy, valid, done, tmo;
    logic [IW-1:0]   idx;
    logic [W-1:0]    res;
    logic [1:0]      bits, ovf;
    logic [2*N-1:0]  resp;
    ropuf_top #(.N(N), .CHIP_SEED(c + 1), .JITTER_PS(100)) dut (
      .clk(clk), .rst_n(rst_n), .start_single(1'b0), .start_sweep(start),
      .sel0('0), .sel1('0), .busy(busy), .res_valid(valid), .res_idx(idx), .result(res),
      .res_bits(bits), .response(resp), .resp_done(done), .ovf(ovf), .timeout(tmo)
    );
    always @(posedge clk) begin
      if (valid) raw[c][rep][idx] <= res;
      if (done) begin
        done_v[c] <= 1'b1;
        hw_resp[c][rep] <= resp;
      end
    end
  end

  function automatic logic gbit(input logic [W-1:0] v, input int pos);
    int i;
    i = W - pos;
    return v[i] ^ ((i == W - 1) ? 1'b0 : v[i+1]);
  endfunction

  // Hamming distance between the selection of two measurements of all pairs
  function automatic int hd(input int c0, input int r0, input int c1, input int r1,
                            input int pf, input int pl);
    int d;
    d = 0;
    for (int k = 0; k < N; k++)
      for (int p = pf; p <= pl; p++)
        if (gbit(raw[c0][r0][k], p) != gbit(raw[c1][r1][k], p)) d++;
    return d;
  endfunction

  // Hamming distance of one measurement to the bitwise majority of all REPS
  // measurements of the same chip (the "mean output" reference)
  function automatic int hd_major(input int c, input int r, input int pf, input int pl);
    int d;
    d = 0;
    for (int k = 0; k < N; k++)
      for (int p = pf; p <= pl; p++) begin
        int ones;
        ones = 0;
        for (int q = 0; q < REPS; q++) ones += int'(gbit(raw[c][q][k], p));
        if (gbit(raw[c][r][k], p) != (2 * ones > REPS)) d++;
      end
    return d;
  endfunction

  real intra [NSEL], intra_m [NSEL], inter [NSEL];

  initial begin
    #33 rst_n = 1'b1;
    for (rep = 0; rep < REPS; rep++) begin
      done_v = '0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      wait (&done_v);
      repeat (2) @(negedge clk);
    end
    for (int s = 0; s < NSEL; s++) begin
      int bits, di, dm, de;
      bits = N * (SEL_L[s] - SEL_F[s] + 1);
      di = 0;
      dm = 0;
      de = 0;
      for (int c = 0; c < CHIPS; c++)
        for (int r = 1; r < REPS; r++) di += hd(c, 0, c, r, SEL_F[s], SEL_L[s]);
      for (int c = 0; c < CHIPS; c++)
        for (int r = 0; r < REPS; r++) dm += hd_major(c, r, SEL_F[s], SEL_L[s]);
      for (int c = 0; c < CHIPS - 1; c++)
        for (int d = c + 1; d < CHIPS; d++) de += hd(c, 0, d, 0, SEL_F[s], SEL_L[s]);
      intra[s] = 100.0 * di / (CHIPS * (REPS - 1) * bits);
      intra_m[s] = 100.0 * dm / (CHIPS * REPS * bits);
      inter[s] = 100.0 * de / ((CHIPS * (CHIPS - 1) / 2) * bits);
      $display("positions %0d-%0d  w=%0d  HD_intra %6.2f %% (vs majority %6.2f %%)  HD_inter %6.2f %%",
               SEL_F[s], SEL_L[s], SEL_L[s] - SEL_F[s] + 1, intra[s], intra_m[s], inter[s]);
    end
    for (int c = 0; c < CHIPS; c++)
      for (int r = 0; r < REPS; r++) begin
        logic [2*N-1:0] m;
        for (int k = 0; k < N; k++) m[2*k +: 2] = {gbit(raw[c][r][k], 7), gbit(raw[c][r][k], 8)};
        check(hw_resp[c][r] == m, $sformatf("chip %0d sweep %0d response matches raw values", c, r));
      end
    check(inter[1] > intra[1], "positions 7-8: chips differ more than repeats");
    check(intra[5] > intra[1], "positions 13-16 are less stable than 7-8");
    check(intra_m[5] <= intra[5], "majority reference gives no higher HD_intra (13-16)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
