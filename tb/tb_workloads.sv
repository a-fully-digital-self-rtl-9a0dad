// tb_workloads: runs the converter configurations of the evaluation that this
// RTL can express (positive power-of-two gains, "minimal+1" stages), each on
// its own adc_top instance with random 1 % (or 0.5 %) component errors and
// 0.1 lsb noise:
//   16 stages, A = 2, one pass           (16 bits, the default converter)
//   16 stages, A = 2, two passes
//   16 stages, A = 2, 0.5 % errors
//    4 stages, A = 4                     ( 8 bits)
//    8 stages, A = 4                     (16 bits)
//   24 stages, A = 2                     (24 bits; 26-bit weights, 52-bit result bus)
// Each must end below 2.5 lsb of non-linearity (3 lsb for 24 bits) and improve
// on the uncalibrated converter. A batch of 16 more default converters, each
// with its own random errors, gives the mean and spread of the calibrated
// non-linearity; the mean must stay below 1.5 lsb.
module tb_workloads;

  localparam int N = 6;
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
    adc_harness #(.NAME("L16 A2 1% batch"), .MAX_INL(2.5), .GAIN_TOL(0.15), .NS(2000), .SEED(100 + r))
      u_run (.fin(fin_r[r]), .checks(ch_r[r]), .failures(fl_r[r]), .inl_cal(inl_r[r]));
  end

  adc_harness #(.NAME("L16 A2 1% Nit1"), .MAX_INL(2.5), .SEED(11))
    w0 (.fin(fin[0]), .checks(ch[0]), .failures(fl[0]), .inl_cal(inl[0]));
  adc_harness #(.NAME("L16 A2 1% Nit2"), .N_IT(2), .MAX_INL(2.5), .SEED(11))
    w1 (.fin(fin[1]), .checks(ch[1]), .failures(fl[1]), .inl_cal(inl[1]));
  adc_harness #(.NAME("L16 A2 0.5% Nit1"), .ERR(0.005), .MAX_INL(2.5), .SEED(12))
    w2 (.fin(fin[2]), .checks(ch[2]), .failures(fl[2]), .inl_cal(inl[2]));
  adc_harness #(.NAME("L4 A4 1% Nit1"), .L(4), .NB(2), .MAX_INL(2.5), .SEED(13))
    w3 (.fin(fin[3]), .checks(ch[3]), .failures(fl[3]), .inl_cal(inl[3]));
  adc_harness #(.NAME("L8 A4 1% Nit1"), .L(8), .NB(2), .MAX_INL(2.5), .SEED(14))
    w4 (.fin(fin[4]), .checks(ch[4]), .failures(fl[4]), .inl_cal(inl[4]));
  adc_harness #(.NAME("L24 A2 1% Nit1"), .L(24), .W_W(26), .W_FRAC(24), .R_W(52), .A_W(7),
                .MAX_INL(3.0), .SEED(15))
    w5 (.fin(fin[5]), .checks(ch[5]), .failures(fl[5]), .inl_cal(inl[5]));

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
             "L16 A2 1%", NR, mean, sd, mx);
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
