// adc_harness: runs one complete experiment on an adc_top of the given size:
// linearity before calibration, one calibration, linearity after it.
// NEG_GAIN selects stages of gain -2**NB.
// Non-linearity is measured over NS random inputs: a least-squares line is
// fitted to code vs. input, and the spread of the residuals less the 1 lsb of
// inherent quantisation is reported in lsb (lsb = range / A**L). The
// harness has its own clock, raises fin when done and reports its own
// check and failure counts; it is instantiated by tb_workloads.
//
// After calibration the gain/offset correction runs with reference levels
// 0.1 and 0.9 of the range and the linearity is measured once more.
//
// Checks: post-calibration non-linearity below MAX_INL, smaller than before,
// fitted gain within GAIN_TOL of one (the gain is only set by the separate
// gain/offset step, so it drifts with the component errors and the passes),
// calibration cycle count as designed; after the gain/offset correction:
// gain within (4 + 4*noise) lsb over the full range, offset within
// (3 + 2*noise) lsb, non-linearity still below MAX_INL, cycle count as
// designed.
module adc_harness #(
  parameter int unsigned L       = 16,
  parameter int unsigned NB      = 1,
  parameter int unsigned W_W     = 18,
  parameter int unsigned W_FRAC  = 16,
  parameter int unsigned R_W     = 36,
  parameter int unsigned A_W     = 6,
  parameter int unsigned AV_LOG2 = 0,
  parameter int unsigned N_IT    = 1,
  parameter real         ERR     = 0.01,
  parameter real         NOISE_LSB = 0.1,
  parameter real         MAX_INL = 2.0,
  parameter int unsigned NS      = 3000,
  parameter int unsigned SEED    = 1,
  parameter string       NAME    = "run",
  parameter bit          NEG_GAIN = 1'b0,
  parameter real         GAIN_TOL = 0.1
) (
  output logic fin,
  output int   checks,
  output int   failures,
  output real  inl_cal     // non-linearity after calibration, lsb
);

  localparam int unsigned M       = 1 << NB;
  localparam int unsigned SCALE_B = W_FRAC + NB * L;
  localparam real         LSB     = 1.0 / (2.0 ** (NB * L));
  localparam int unsigned SCALE_CYC =
    3 * ((L + 4) + 1) + (NB * L + 4 + 2) + 2 * L * (M + 1) + 2 * (M + 1);
  localparam int unsigned CAL_CYC =
    1 + N_IT * L * ((M + 1) * ((L + 4) + (1 << AV_LOG2) + 1) + M);

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0, scale_start = 1'b0;
  // Vfix = 1/(2|A|) keeps the residue in range with no increment and with
  // one increment, for either sign of the gain (residues 1 and 0, or 0 and 1).
  real  vin = 0.5, vfix = 0.5 / real'(M);
  logic cal_busy, cal_done, code_valid, scale_busy, scale_done;
  logic signed [R_W-1:0] t_lo = '0, t_hi = '0;
  real  vref_lo = 0.1, vref_hi = 0.9;
  logic signed [R_W-1:0] code_out;

  always #5 clk = ~clk;

  adc_top #(
    .L(L), .NB(NB), .W_W(W_W), .W_FRAC(W_FRAC), .R_W(R_W), .A_W(A_W),
    .AV_LOG2(AV_LOG2), .N_IT(N_IT), .ERR_A(ERR), .ERR_V(ERR), .ERR_D(ERR),
    .NOISE(NOISE_LSB * LSB), .SEED(SEED), .NEG_GAIN(NEG_GAIN)
  ) dut (
    .clk, .rst_n, .vin, .vfix, .vref_lo, .vref_hi, .cal_start, .cal_keep(1'b0),
    .cal_busy, .cal_done, .scale_start, .scale_busy, .scale_done, .t_lo, .t_hi,
    .code_out, .code_valid
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  real hist [NS + L];

  task automatic measure(output real inl, output real gain, output real offs);
    real sx, sy, sxx, sxy, a, b, r, rmin, rmax, x, y;
    int n;
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0; rmin = 1.0e9; rmax = -1.0e9;
    for (int e = 0; e < NS + L; e++) begin
      hist[e] = (e < NS) ? real'($urandom() % 32'd1000000) / 1000000.0 : 0.5;
      vin = hist[e];
      @(posedge clk);
      #1;
      if (e >= L) begin
        x = hist[e - L];
        y = real'(code_out) / (2.0 ** SCALE_B);
        sx += x; sy += y; sxx += x * x; sxy += x * y; n++;
      end
    end
    a = (real'(n) * sxy - sx * sy) / (real'(n) * sxx - sx * sx);
    b = (sy - a * sx) / real'(n);
    for (int e = 0; e < NS + L; e++) begin
      vin = (e < NS) ? hist[e] : 0.5;
      @(posedge clk);
      #1;
      if (e >= L) begin
        x = hist[e - L];
        y = real'(code_out) / (2.0 ** SCALE_B);
        r = y - (a * x + b);
        if (r < rmin) rmin = r;
        if (r > rmax) rmax = r;
      end
    end
    gain = a;
    offs = b / LSB;
    if (a > 0.01) inl = (rmax - rmin) / (a * LSB) - 1.0;
    else          inl = 1.0e9;
    if (inl < 0.0) inl = 0.0;
  endtask

  real inl_pre, inl_post, inl_sc, g_pre, g_post, g_sc, o_pre, o_post, o_sc;
  logic signed [R_W-1:0] one;
  int  cyc;

  initial begin
    fin = 1'b0; checks = 0; failures = 0; inl_cal = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (L + 2) @(posedge clk);
    measure(inl_pre, g_pre, o_pre);
    @(posedge clk);
    #1 cal_start = 1'b1;
    @(posedge clk);
    #1 cal_start = 1'b0;
    cyc = 0;
    while (!cal_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == CAL_CYC, $sformatf("calibration took %0d cycles, expected %0d", cyc, CAL_CYC));
    repeat (L + 1) @(posedge clk);
    measure(inl_post, g_post, o_post);
    inl_cal = inl_post;
    $display("%s: non-linearity %0.2f lsb before, %0.2f lsb after calibration (gain %f), %0d calibration cycles",
             NAME, inl_pre, inl_post, g_post, cyc);
    check(inl_post < MAX_INL, "non-linearity after calibration below limit");
    check(inl_post < inl_pre, "calibration improves linearity");
    check(g_post > 1.0 - GAIN_TOL && g_post < 1.0 + GAIN_TOL, "gain near one");

    // gain/offset correction
    one  = R_W'(1) <<< SCALE_B;
    t_lo = one / 10;
    t_hi = (one / 10) * 9;
    @(posedge clk);
    #1 scale_start = 1'b1;
    @(posedge clk);
    #1 scale_start = 1'b0;
    cyc = 0;
    while (!scale_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == SCALE_CYC, $sformatf("gain/offset correction took %0d cycles, expected %0d", cyc, SCALE_CYC));
    repeat (L + 1) @(posedge clk);
    measure(inl_sc, g_sc, o_sc);
    $display("%s: after gain/offset correction: gain error %0.2f lsb, offset %0.2f lsb, non-linearity %0.2f lsb",
             NAME, (g_sc - 1.0) / LSB, o_sc, inl_sc);
    check((g_sc - 1.0) / LSB < 4.0 + 4.0 * NOISE_LSB && (1.0 - g_sc) / LSB < 4.0 + 4.0 * NOISE_LSB,
          "gain one after correction");
    check(o_sc < 3.0 + 2.0 * NOISE_LSB && o_sc > -3.0 - 2.0 * NOISE_LSB, "offset zero after correction");
    check(inl_sc < MAX_INL, "non-linearity after correction below limit");
    fin = 1'b1;
  end

endmodule
