// tb_workloads_neg: the evaluated converter configurations with negative
// inter-stage gains, each on its own adc_top instance (through adc_harness)
// with random component errors:
//   16 stages, A = -2: 1 % errors with 0.1 lsb noise, without noise, with a
//                      second pass, with 2 lsb noise (1 and 8 averages),
//                      3 % errors (one and two passes)
//   20 stages, A = -2: 20 bits (22-bit weights, 44-bit result bus)
//   24 stages, A = -4: 48 bits (50-bit weights, 100-bit result bus), one and
//                      two passes
// Each must end below its non-linearity limit (measured from conversions, in
// lsb of 2**-bits) and improve on the uncalibrated converter. The limits of
// the 2 lsb noise cases include the noise of the conversions themselves.
// A batch of 16 more 16-stage A = -2 converters with 1 % errors gives the
// mean and spread of the calibrated non-linearity; the mean must stay below
// 1.5 lsb.
module tb_workloads_neg;

  localparam int N = 10;
  logic fin [N];
  int   ch  [N];
  int   fl  [N];
  real  inl [N];

  // A batch of NR converters of the main configuration, each with its own
  // random errors, for the mean and spread of the calibrated non-linearity.
  localparam int NR = 16;
  logic fin_r [NR];
  int   ch_r  [NR];
  int   fl_r  [NR];
  real  inl_r [NR];
  for (genvar r = 0; r < NR; r++) begin : g_batch
    adc_harness #(.NAME("L16 A-2 1% batch"), .NEG_GAIN(1'b1), .MAX_INL(2.5), .GAIN_TOL(0.15), .NS(2000), .SEED(100 + r))
      u_run (.fin(fin_r[r]), .checks(ch_r[r]), .failures(fl_r[r]), .inl_cal(inl_r[r]));
  end

  adc_harness #(.NAME("L16 A-2 1% n0.1"), .NEG_GAIN(1'b1), .MAX_INL(2.5), .SEED(21))
    w0 (.fin(fin[0]), .checks(ch[0]), .failures(fl[0]), .inl_cal(inl[0]));
  adc_harness #(.NAME("L16 A-2 1% n0"), .NEG_GAIN(1'b1), .NOISE_LSB(0.0), .MAX_INL(2.5), .SEED(21))
    w1 (.fin(fin[1]), .checks(ch[1]), .failures(fl[1]), .inl_cal(inl[1]));
  adc_harness #(.NAME("L16 A-2 1% Nit2"), .NEG_GAIN(1'b1), .N_IT(2), .MAX_INL(2.5), .SEED(21))
    w2 (.fin(fin[2]), .checks(ch[2]), .failures(fl[2]), .inl_cal(inl[2]));
  adc_harness #(.NAME("L16 A-2 1% n2 Nav1"), .NEG_GAIN(1'b1), .NOISE_LSB(2.0), .MAX_INL(12.0), .SEED(22))
    w3 (.fin(fin[3]), .checks(ch[3]), .failures(fl[3]), .inl_cal(inl[3]));
  adc_harness #(.NAME("L16 A-2 1% n2 Nav8"), .NEG_GAIN(1'b1), .NOISE_LSB(2.0), .AV_LOG2(3), .MAX_INL(10.0), .SEED(22))
    w4 (.fin(fin[4]), .checks(ch[4]), .failures(fl[4]), .inl_cal(inl[4]));
  adc_harness #(.NAME("L16 A-2 3% Nit1"), .NEG_GAIN(1'b1), .ERR(0.03), .GAIN_TOL(0.2), .MAX_INL(5.0), .SEED(23))
    w5 (.fin(fin[5]), .checks(ch[5]), .failures(fl[5]), .inl_cal(inl[5]));
  adc_harness #(.NAME("L16 A-2 3% Nit2"), .NEG_GAIN(1'b1), .ERR(0.03), .GAIN_TOL(0.2), .N_IT(2), .MAX_INL(3.0), .SEED(23))
    w6 (.fin(fin[6]), .checks(ch[6]), .failures(fl[6]), .inl_cal(inl[6]));
  adc_harness #(.NAME("L20 A-2 1%"), .NEG_GAIN(1'b1), .L(20), .W_W(22), .W_FRAC(20), .R_W(44), .A_W(7),
                .MAX_INL(3.0), .SEED(24))
    w7 (.fin(fin[7]), .checks(ch[7]), .failures(fl[7]), .inl_cal(inl[7]));
  adc_harness #(.NAME("L24 A-4 1% Nit1"), .NEG_GAIN(1'b1), .L(24), .NB(2), .W_W(50), .W_FRAC(48),
                .R_W(100), .A_W(8), .MAX_INL(6.0), .SEED(25))
    w8 (.fin(fin[8]), .checks(ch[8]), .failures(fl[8]), .inl_cal(inl[8]));
  adc_harness #(.NAME("L24 A-4 1% Nit2"), .NEG_GAIN(1'b1), .L(24), .NB(2), .W_W(50), .W_FRAC(48),
                .R_W(100), .A_W(8), .N_IT(2), .MAX_INL(4.0), .SEED(25))
    w9 (.fin(fin[9]), .checks(ch[9]), .failures(fl[9]), .inl_cal(inl[9]));

  int checks, failures;
  bit all_fin;

  // Mean and standard deviation of the batch; the mean must stay below
  // MEAN_MAX lsb.
  localparam real MEAN_MAX = 1.5;
  task automatic batch_stats();
    real sum = 0.0, sq = 0.0, mean, sd, mx = 0.0;
    for (int i = 0; i < NR; i++) begin
      sum += inl_r[i];
      sq  += inl_r[i] * inl_r[i];
      if (inl_r[i] > mx) mx = inl_r[i];
    end
    mean = sum / real'(NR);
    sd   = (sq / real'(NR) - mean * mean);
    sd   = (sd > 0.0) ? $sqrt(sd * real'(NR) / real'(NR - 1)) : 0.0;
    $display("%s batch of %0d converters: non-linearity after calibration mean %0.2f lsb, sigma %0.2f lsb, worst %0.2f lsb",
             "L16 A-2 1%", NR, mean, sd, mx);
    checks++;
    if (!(mean < MEAN_MAX)) begin
      failures++;
      $display("FAIL: batch mean %0.2f lsb", mean);
    end
  endtask

  initial begin
    do begin
      #1000;
      all_fin = 1'b1;
      for (int i = 0; i < N; i++) all_fin &= fin[i];
      for (int i = 0; i < NR; i++) all_fin &= fin_r[i];
    end while (!all_fin);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
    end
    for (int i = 0; i < NR; i++) begin
      checks += ch_r[i];
      failures += fl_r[i];
    end
    batch_stats();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures = 1;
    for (int i = 0; i < N; i++) failures += fl[i];
    for (int i = 0; i < NR; i++) failures += fl_r[i];
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
