// tb_adc_stage_model: checks the behavioural analog stage (A = 2).
//  * An ideal instance (no errors, no noise) must give, one clock after each
//    sample, therm = {vin > 0.75, vin > 0.25} and
//    vres = 2 * (v - V_DAC), V_DAC = -0.25 + 0.5 * (increments enabled),
//    where v is vin, or vfix when sel_fix is high, and the increments follow
//    the flash, or ext_inc when ext_en is high.
//  * An instance with 1 % errors must stay within the error bound
//    |vres - ideal| <= 2 * (3 * 0.01) + 0.01 * |ideal| and must differ from
//    the ideal somewhere.
//  * An ideal negative-gain instance (NEG_GAIN) must give the same therm and
//    vres = -2 * (v - V_DAC), V_DAC = 0.25 + 0.5 * (increments enabled).
module tb_adc_stage_model;

  logic clk = 1'b0;
  real vin = 0.0, vfix = 0.25;
  logic sel_fix = 1'b0, ext_en = 1'b0;
  logic [1:0] ext_inc = '0;
  logic [1:0] th_i, th_e, th_n;
  real vr_i, vr_e, vr_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_stage_model #(.ERR_A(0.0), .ERR_V(0.0), .ERR_D(0.0), .NOISE(0.0)) ideal (
    .clk, .vin, .vfix, .sel_fix, .ext_en, .ext_inc, .therm(th_i), .vres(vr_i)
  );
  adc_stage_model #(.ERR_A(0.0), .ERR_V(0.0), .ERR_D(0.0), .NOISE(0.0), .NEG_GAIN(1'b1)) ideal_n (
    .clk, .vin, .vfix, .sel_fix, .ext_en, .ext_inc, .therm(th_n), .vres(vr_n)
  );
  adc_stage_model #(.SEED(77)) errd (
    .clk, .vin, .vfix, .sel_fix, .ext_en, .ext_inc, .therm(th_e), .vres(vr_e)
  );

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  int n_diff = 0;

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [1:0] exp_th, inc;
      real v, exp_vr;
      @(negedge clk);
      vin     = real'($urandom() % 12000) / 10000.0 - 0.1;
      vfix    = real'($urandom() % 2000) / 10000.0 + 0.15;
      sel_fix = ($urandom() % 3) == 0;
      ext_en  = ($urandom() % 3) == 0;
      ext_inc = 2'($urandom());
      exp_th  = {vin > 0.75, vin > 0.25};
      inc     = ext_en ? ext_inc : exp_th;
      v       = sel_fix ? vfix : vin;
      exp_vr  = 2.0 * (v - (-0.25 + 0.5 * real'($countones(inc))));
      @(posedge clk);
      #1;
      checks++;
      if (th_i !== exp_th || absr(vr_i - exp_vr) > 1.0e-9) begin
        failures++;
        $display("FAIL: vin=%f sel=%b ext=%b/%b therm=%b vres=%f expected %b %f",
                 vin, sel_fix, ext_en, ext_inc, th_i, vr_i, exp_th, exp_vr);
      end
      checks++;
      if (th_n !== exp_th || absr(vr_n - (-2.0) * (v - (0.25 + 0.5 * real'($countones(inc))))) > 1.0e-9) begin
        failures++;
        $display("FAIL: negative gain vin=%f therm=%b vres=%f", vin, th_n, vr_n);
      end
      // errored stage: compare with the ideal response to its own flash code
      inc    = ext_en ? ext_inc : th_e;
      exp_vr = 2.0 * (v - (-0.25 + 0.5 * real'($countones(inc))));
      checks++;
      if (absr(vr_e - exp_vr) > 0.06 + 0.01 * absr(exp_vr)) begin
        failures++;
        $display("FAIL: errored stage vres=%f ideal %f", vr_e, exp_vr);
      end
      if (absr(vr_e - exp_vr) > 1.0e-6) n_diff++;
    end
    checks++;
    if (n_diff < 400) begin
      failures++;
      $display("FAIL: errored stage matches the ideal too often (%0d)", n_diff);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
