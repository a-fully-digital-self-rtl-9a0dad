// tb_cal_progress: follows the linearity of the default converter (16 stages,
// A = 2, 1 % errors on all components, 0.1 lsb noise) through two calibration
// passes, one point before calibration and one after each calibrated stage.
//
// The linearity is computed from the weights, not from conversions, because
// the converter cannot convert while it is calibrating. After stage l has been
// written, the pipeline is looked at in the order in which stage l is the
// most significant stage: l, l-1, ..., 0, L-1, ..., l+1. For the stage at
// position p (p = L-1 first) the ideal input-referred DAC level for local
// code j is
//
//     I_p[j] = V_DAC[j] / (product of the gains of the stages before it),
//
// with V_DAC and the gains the actual values of the analog model. The
// calibrated weight contributes w_p[j] / A**(L-1-p) to the result. After a
// common gain G is removed (G chosen to minimise the result), every stage
// adds the spread of its errors, max_j - min_j of w_p[j]/A**(L-1-p) - G*I_p[j],
// to the worst-case error; a constant per stage is only an offset and drops
// out. The sum, in lsb of 2**-L, gives the linearity in bits:
//
//     bits = L - log2(1 + error_lsb)
//
// This measure is pessimistic: it adds the worst case of every stage.
// Checks: poor linearity before calibration; within pass 1 a gain of about
// one bit per stage (no step losing more than one bit, at least 6 bits gained
// by the middle of the pass); at least 14.5 bits at the end of each pass;
// every stage measured in both passes.
module tb_cal_progress;

  localparam int unsigned L   = cal_pkg::STAGES;
  localparam int unsigned NB  = cal_pkg::BITS_PER_STAGE;
  localparam int unsigned M   = 1 << NB;
  localparam int unsigned R_W = cal_pkg::RESULT_W;
  localparam int unsigned CDW = $clog2(M + 1);
  localparam real         A   = real'(1 << NB);
  localparam real         WSCALE = real'(64'd1 << cal_pkg::WEIGHT_FRAC);
  localparam int unsigned CAL_CYC = 1 + L * ((M + 1) * ((L + 4) + 1 + 1) + M);

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0, cal_keep = 1'b0;
  real  vin = 0.5, vfix = 0.5 / real'(M), vref_lo = 0.1, vref_hi = 0.9;
  logic signed [R_W-1:0] t_lo = '0, t_hi = '0;
  logic cal_busy, cal_done, code_valid, scale_busy, scale_done;
  logic signed [R_W-1:0] code_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_top dut (
    .clk, .rst_n, .vin, .vfix, .vref_lo, .vref_hi, .cal_start, .cal_keep,
    .cal_busy, .cal_done, .scale_start(1'b0), .scale_busy, .scale_done, .t_lo, .t_hi,
    .code_out, .code_valid
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Weight tables and actual analog values, gathered from the hierarchy.
  real wt    [L][M+1];   // calibrated weights, in units of the range
  real vdac  [L][M+1];   // actual DAC levels of each stage
  real gain  [L];        // actual stage gains
  for (genvar k = 0; k < L; k++) begin : g_peek
    always_comb begin
      for (int i = 0; i <= M; i++)
        wt[k][i] = real'(dut.u_core.g_slice[k].u_slice.u_lut.table_q[i]) / WSCALE;
      vdac[k][0] = dut.g_stage[k].u_stage.dac0;
      for (int i = 1; i <= M; i++)
        vdac[k][i] = vdac[k][i-1] + dut.g_stage[k].u_stage.incr[i-1];
      gain[k] = dut.g_stage[k].u_stage.gain;
    end
  end

  // Ideal input-referred levels and scaled weights for the order that starts
  // with stage `first`.
  real ideal [L][M+1];
  real actual[L][M+1];

  function automatic int unsigned stage_at(input int unsigned first, input int unsigned p);
    return (first + L - (L - 1 - p)) % L;
  endfunction

  function automatic void prepare(input int unsigned first);
    real g_before = 1.0;
    for (int p = L - 1; p >= 0; p--) begin
      int unsigned s = stage_at(first, p);
      for (int j = 0; j <= M; j++) begin
        ideal[p][j]  = vdac[s][j] / g_before;
        actual[p][j] = wt[s][j] / (A ** (L - 1 - p));
      end
      g_before = g_before * gain[s];
    end
  endfunction

  function automatic real spread_sum(input real g);
    real tot = 0.0;
    for (int p = 0; p < L; p++) begin
      real lo = 1.0e9, hi = -1.0e9;
      for (int j = 0; j <= M; j++) begin
        real e = actual[p][j] - g * ideal[p][j];
        if (e < lo) lo = e;
        if (e > hi) hi = e;
      end
      tot += hi - lo;
    end
    return tot;
  endfunction

  // The error is a sum of convex functions of G: ternary search.
  function automatic real linearity_bits(input int unsigned first);
    real a = 0.8, b = 1.25, err;
    prepare(first);
    for (int it = 0; it < 100; it++) begin
      real m1 = a + (b - a) / 3.0, m2 = b - (b - a) / 3.0;
      if (spread_sum(m1) <= spread_sum(m2)) b = m2; else a = m1;
    end
    err = spread_sum((a + b) / 2.0) * real'(64'd1 << L);
    return real'(L) - $ln(1.0 + err) / $ln(2.0);
  endfunction

  // ---- record one point after every completed stage ------------------------
  real bits [2*L+1];
  int  n_pts = 1;
  int  seen  [2][L];
  int  pass  = 0;

  always @(posedge clk) begin
    if (dut.u_core.cal_wr && dut.u_core.cal_waddr[CDW-1:0] == CDW'(M)) begin
      int unsigned s;
      s = int'(dut.u_core.cal_waddr) >> CDW;
      @(negedge clk);
      if (n_pts <= 2 * L) begin
        bits[n_pts] = linearity_bits(s);
        seen[pass][s]++;
        n_pts++;
      end
    end
  end

  int unsigned cyc;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    bits[0] = linearity_bits(L - 1);

    for (int ps = 0; ps < 2; ps++) begin
      pass = ps;
      @(negedge clk);
      cal_start = 1'b1;
      cal_keep  = (ps != 0);
      @(posedge clk);
      #1 begin cal_start = 1'b0; cal_keep = 1'b0; end
      cyc = 0;
      while (!cal_done || cal_busy) begin
        @(posedge clk);
        #1 cyc++;
      end
      repeat (2) @(posedge clk);
      check(cyc == CAL_CYC, $sformatf("pass %0d took %0d cycles, expected %0d", ps + 1, cyc, CAL_CYC));
      if (ps == 0) begin
        // done is sticky: wait for it to drop at the next start
        @(negedge clk);
      end
    end

    $display("step  stage  bits");
    $display("%4d      -  %5.2f   (before calibration)", 0, bits[0]);
    for (int k = 1; k < n_pts; k++)
      $display("%4d  %5d  %5.2f   (pass %0d)", k, (k - 1) % L, bits[k], (k - 1) / L + 1);

    check(n_pts == 2 * L + 1, $sformatf("%0d points recorded, expected %0d", n_pts, 2 * L + 1));
    for (int ps = 0; ps < 2; ps++)
      for (int s = 0; s < L; s++)
        check(seen[ps][s] == 1, $sformatf("pass %0d: stage %0d completed %0d times", ps + 1, s, seen[ps][s]));
    check(bits[0] < 10.0, $sformatf("before calibration %.2f bits, expected a poor converter", bits[0]));
    for (int k = 2; k <= L; k++)
      check(bits[k] > bits[k-1] - 1.0, $sformatf("pass 1 step %0d lost %.2f bits", k, bits[k-1] - bits[k]));
    check(bits[L/2] > bits[0] + 6.0, $sformatf("only %.2f bits gained by mid pass 1", bits[L/2] - bits[0]));
    check(bits[L] >= 14.5, $sformatf("end of pass 1: %.2f bits", bits[L]));
    check(bits[2*L] >= 14.5, $sformatf("end of pass 2: %.2f bits", bits[2*L]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * CAL_CYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
