// tb_adc_top: end-to-end test of the self-calibrating converter at its
// default size (16 stages, A = 2, 1 % random component errors, 0.1 lsb noise).
//
//  1. Converts NS random inputs with the nominal weights and measures the
//     non-linearity: a least-squares line is fitted to code vs. input and the
//     spread of the residuals, less the 1 lsb inherent quantisation, is the
//     error in lsb (lsb = range / 2**16).
//  2. Runs one calibration and checks its cycle count against
//     1 + N_IT * L * ((M+1)*(SETTLE + N_AV + 1) + M).
//  3. Converts NS inputs again and requires the non-linearity to be below
//     MAX_INL_LSB, to be at least 10 times smaller than before, and the
//     fitted gain to be within 10 % of one.
//  4. Runs a second, refining pass (cal_keep: no reload of nominal weights)
//     and checks the non-linearity again.
//  5. Runs the gain/offset correction with references 0.1 and 0.9 and
//     requires gain 1 +- 1e-4, offset within 2 lsb, linearity kept, and the
//     cycle count 3*(SETTLE+1) + 22 + 2*L*(M+1) + 2*(M+1).
// Also checked: the conversion latency of L cycles, that every slice started a
// conversion (force to zero) and drove the data bus, that every stage's
// table received M writes per calibration pass, that every DAC increment was driven externally and
// that the analog ring was closed.
module tb_adc_top;

  localparam int unsigned L        = cal_pkg::STAGES;
  localparam int unsigned NB       = cal_pkg::BITS_PER_STAGE;
  localparam int unsigned M        = 1 << NB;
  localparam int unsigned R_W      = cal_pkg::RESULT_W;
  localparam int unsigned SCALE_B  = cal_pkg::WEIGHT_FRAC + NB * L;
  localparam int unsigned NS       = 4000;
  localparam int unsigned CAL_CYC  = 1 + L * ((M + 1) * ((L + 4) + 1 + 1) + M);
  localparam int unsigned SCALE_CYC = 3 * ((L + 4) + 1) + 22 + 2 * L * (M + 1) + 2 * (M + 1);
  localparam real         MAX_INL_LSB = 2.0;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0, cal_keep = 1'b0, scale_start = 1'b0;
  real  vin = 0.5, vfix = 0.5 / real'(M), vref_lo = 0.1, vref_hi = 0.9;
  logic signed [R_W-1:0] t_lo, t_hi;
  logic cal_busy, cal_done, code_valid, scale_busy, scale_done;
  logic signed [R_W-1:0] code_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_top dut (
    .clk, .rst_n, .vin, .vfix, .vref_lo, .vref_hi, .cal_start, .cal_keep,
    .cal_busy, .cal_done, .scale_start, .scale_busy, .scale_done, .t_lo, .t_hi,
    .code_out, .code_valid
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters -------------------------------------------------
  int n_force [L];
  int n_gate  [L];
  int n_write [L];
  int n_inc   [M];
  int n_ring, n_reload, n_ref_lo, n_ref_hi, n_readback;

  for (genvar k = 0; k < L; k++) begin : g_mon
    always @(posedge clk) begin
      if (dut.u_core.cal_busy && dut.u_core.g_slice[k].u_slice.force_zero) n_force[k]++;
      if (dut.u_core.g_slice[k].u_slice.gate_en) n_gate[k]++;
      if (dut.u_core.cal_wr && 32'(dut.u_core.wr_addr[cal_pkg::WADDR_W-1:$clog2(M+1)]) == k)
        n_write[k]++;
    end
  end
  always @(posedge clk) begin
    if (dut.u_core.ring_closed) n_ring++;
    if (dut.u_core.load_nominal) n_reload++;
    if (dut.u_core.ref_sel == 2'd1) n_ref_lo++;
    if (dut.u_core.ref_sel == 2'd2) n_ref_hi++;
    if (dut.u_core.rd_en) n_readback++;
    for (int j = 0; j < M; j++) if (dut.u_core.ext_inc[j] && |dut.u_core.ext_en) n_inc[j]++;
  end

  // ---- linearity measurement ----------------------------------------------
  real hist [NS + L];

  // Converts NS random inputs and returns the non-linearity in lsb.
  real offset_scaled;
  task automatic measure(output real inl, output real gain, input string tag);
    real sx, sy, sxx, sxy, a, b, r, rmin, rmax, x, y;
    int  n;
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0;
    rmin = 1.0e9; rmax = -1.0e9;
    // first pass: fit
    for (int e = 0; e < NS + L; e++) begin
      hist[e] = (e < NS) ? real'($urandom() % 32'd1000000) / 1000000.0 : 0.5;
      vin = hist[e];
      @(posedge clk);
      #1;
      if (e >= L) begin
        x = hist[e - L];
        y = real'(code_out) / real'(64'd1 << SCALE_B);
        sx += x; sy += y; sxx += x * x; sxy += x * y; n++;
      end
    end
    a = (real'(n) * sxy - sx * sy) / (real'(n) * sxx - sx * sx);
    b = (sy - a * sx) / real'(n);
    // second pass: same inputs again, residuals against the fitted line
    for (int e = 0; e < NS + L; e++) begin
      vin = (e < NS) ? hist[e] : 0.5;
      @(posedge clk);
      #1;
      if (e >= L) begin
        x = hist[e - L];
        y = real'(code_out) / real'(64'd1 << SCALE_B);
        r = y - (a * x + b);
        if (r < rmin) rmin = r;
        if (r > rmax) rmax = r;
      end
    end
    gain = a;
    offset_scaled = b;
    if (a > 0.01) inl = (rmax - rmin) / (a / real'(64'd1 << (NB * L))) - 1.0;
    else          inl = 1.0e9;
    if (inl < 0.0) inl = 0.0;
    $display("%s: gain %f offset %e non-linearity %0.3f lsb", tag, a, b, inl);
  endtask

  real inl_pre, inl_post, gain_pre, gain_post, inl_pass2, gain_pass2, inl_scaled, gain_scaled;
  int  cyc;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (L + 2) @(posedge clk);
    #1;
    check(code_valid, "code_valid after pipeline fill");

    // latency: a step on vin shows on code_out exactly L edges later
    vin = 0.1;
    repeat (L + 2) @(posedge clk);
    #1 vin = 0.9;
    begin : latency
      logic signed [R_W-1:0] c0;
      c0 = code_out;
      repeat (L) @(posedge clk);
      #1 check(code_out == c0, "code_out unchanged L cycles after vin changed");
      @(posedge clk);
      #1 check(code_out > c0 + (R_W'(1) <<< (SCALE_B - 1)), "code_out follows the sample L cycles after the sampling edge");
    end

    measure(inl_pre, gain_pre, "before calibration");

    // calibration
    @(posedge clk);
    #1 cal_start = 1'b1;
    @(posedge clk);
    #1 cal_start = 1'b0;
    cyc = 0;
    while (!cal_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    $display("calibration took %0d cycles (expected %0d)", cyc, CAL_CYC);
    check(cyc == CAL_CYC, "calibration cycle count");
    check(!cal_busy, "busy low after calibration");
    repeat (L + 1) @(posedge clk);
    #1 check(code_valid, "code_valid after calibration");

    measure(inl_post, gain_post, "after calibration");
    check(gain_post > 0.9 && gain_post < 1.1, "overall gain near 1 after calibration");
    check(inl_post < MAX_INL_LSB, "non-linearity after calibration below limit");
    check(inl_pre > 10.0 * inl_post, "calibration reduces non-linearity at least tenfold");

    // second pass, refining the present weights
    @(posedge clk);
    #1 begin cal_start = 1'b1; cal_keep = 1'b1; end
    @(posedge clk);
    #1 begin cal_start = 1'b0; cal_keep = 1'b0; end
    while (!cal_done) @(posedge clk);
    repeat (L + 2) @(posedge clk);
    measure(inl_pass2, gain_pass2, "after second pass");
    check(inl_pass2 < MAX_INL_LSB, "non-linearity after second pass below limit");
    check(n_reload == 1, $sformatf("nominal weights loaded once, not on the refining pass (%0d)", n_reload));

    // gain/offset correction: vref_lo and vref_hi must convert to their value
    t_lo = R_W'(longint'(vref_lo * real'(64'd1 << SCALE_B)));
    t_hi = R_W'(longint'(vref_hi * real'(64'd1 << SCALE_B)));
    @(posedge clk);
    #1 scale_start = 1'b1;
    @(posedge clk);
    #1 scale_start = 1'b0;
    cyc = 0;
    while (!scale_done) begin
      @(posedge clk);
      #1 cyc++;
    end
    $display("gain/offset correction took %0d cycles (expected %0d)", cyc, SCALE_CYC);
    check(cyc == SCALE_CYC, "gain/offset correction cycle count");
    repeat (L + 2) @(posedge clk);
    measure(inl_scaled, gain_scaled, "after gain/offset correction");
    check(gain_scaled > 0.9999 && gain_scaled < 1.0001, "gain corrected to within 1e-4");
    check(offset_scaled > -3.0 / 65536.0 && offset_scaled < 2.0 / 65536.0,
          "offset corrected to within 2 lsb (results round down by up to 1 lsb)");
    check(inl_scaled < MAX_INL_LSB, "non-linearity after gain/offset correction below limit");
    check(n_ref_lo > 0 && n_ref_hi > 0 && n_readback == L * (M + 1) + M + 1,
          $sformatf("references applied and every weight read back (%0d reads)", n_readback));

    for (int k = 0; k < L; k++) begin
      check(n_force[k] > 0, $sformatf("slice %0d started a calibration conversion", k));
      check(n_gate[k] > 0, $sformatf("slice %0d drove the data bus", k));
      check(n_write[k] == 2 * M, $sformatf("stage %0d table written %0d times by calibration", k, n_write[k]));
    end
    for (int j = 0; j < M; j++) check(n_inc[j] > 0, $sformatf("increment %0d driven", j));
    check(n_ring > 0, "analog ring closed during calibration");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * NS + 3 * CAL_CYC + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
