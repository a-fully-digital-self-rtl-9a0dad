// adc_stage_model: behavioural model of one analog "minimal+1" pipeline stage,
// modified for self-calibration. This is an analog block; the model is not
// synthesizable and exists so that the digital calibration logic can be
// simulated against a converter with component errors.
//
// Structure (one stage of gain A = 2**NB, input range 0..1):
//  * Flash: M = A comparators with nominal trip points (j + 1/2) / A,
//    j = 0 .. M-1 (0.25 and 0.75 for A = 2). They always look at the stage's
//    incoming signal vin and give a thermometer code.
//  * Input multiplexer: the sample/hold takes vin, or the fixed potential vfix
//    when sel_fix is high (calibration of this stage).
//  * DAC/subtractor: a fixed level (nominally -1/(2A), biasing the amplifier)
//    and M increments (nominally 1/A each) that are subtracted from the input.
//    Normally increment k is enabled by comparator k; with ext_en high the
//    increments are taken from ext_inc instead, bypassing the flash.
//  * Sample/hold amplifier of gain A: vres = A * (v - V_DAC) + noise.
//  * NEG_GAIN: A = -2**NB and the fixed level is nominally +1/(2|A|), so the
//    DAC levels are (i + 1/2)/|A| and the residue stays within 0..1.
//
// Component errors: every comparator trip point, the fixed DAC level and every
// increment get an absolute error and the gain a relative error, drawn
// uniformly from +-ERR_V, +-ERR_D and +-ERR_A (fractions of the range, resp. of
// A). They are drawn once from a 64-bit linear congruential generator seeded
// with SEED, so each instance with its own SEED is a repeatable random stage.
// NOISE is the peak of a uniform input-referred noise, in units of the range.
// The distribution of the errors and of the noise is this model's choice.
//
// Timing: on each rising clk edge the stage samples; therm and vres are the
// registered flash code and residue of that sample, valid until the next edge.
module adc_stage_model #(
  parameter int unsigned NB     = 1,
  parameter int unsigned M      = 1 << NB,
  parameter real         ERR_A  = 0.01,
  parameter real         ERR_V  = 0.01,
  parameter real         ERR_D  = 0.01,
  parameter real         NOISE  = 0.0,
  parameter int unsigned SEED   = 1,
  parameter bit          NEG_GAIN = 1'b0
) (
  input  logic         clk,
  input  real          vin,       // incoming signal (previous stage or ring)
  input  real          vfix,      // fixed calibration potential
  input  logic         sel_fix,   // sample vfix instead of vin
  input  logic         ext_en,    // DAC increments under external control
  input  logic [M-1:0] ext_inc,   // increments enabled when ext_en is high
  output logic [M-1:0] therm,     // registered flash thermometer code
  output real          vres       // registered residue
);

  localparam real A_NOM = real'(1 << NB);

  real trip   [M];   // actual comparator trip points
  real incr   [M];   // actual DAC increments
  real dac0;         // actual fixed DAC level
  real gain;         // actual amplifier gain

  // One step of the generator, and its state mapped to a real in [-1, 1).
  function automatic longint unsigned lcg_step(input longint unsigned s);
    return s * 64'd6364136223846793005 + 64'd1442695040888963407;
  endfunction

  function automatic real lcg_real(input longint unsigned s);
    return real'(s >> 11) / real'(64'd1 << 52) - 1.0;
  endfunction

  initial begin : draw_errors
    longint unsigned st;
    st = lcg_step(64'h9E3779B97F4A7C15 ^ longint'(SEED));
    for (int j = 0; j < M; j++) begin
      st      = lcg_step(st);
      trip[j] = (real'(j) + 0.5) / A_NOM + ERR_V * lcg_real(st);
      st      = lcg_step(st);
      incr[j] = 1.0 / A_NOM + ERR_D * lcg_real(st);
    end
    st   = lcg_step(st);
    dac0 = (NEG_GAIN ? 0.5 : -0.5) / A_NOM + ERR_D * lcg_real(st);
    st   = lcg_step(st);
    gain = (NEG_GAIN ? -A_NOM : A_NOM) * (1.0 + ERR_A * lcg_real(st));
    therm = '0;
    vres  = 0.0;
  end

  // Uniform noise sample in [-NOISE, NOISE).
  function automatic real noise_sample();
    return NOISE * (real'($urandom() % 32'd65536) / 32768.0 - 1.0);
  endfunction

  logic [M-1:0] flash;
  logic [M-1:0] inc_en;
  real          v_sh;
  real          v_dac;

  always_comb begin
    for (int j = 0; j < M; j++) flash[j] = (vin > trip[j]);
    inc_en = ext_en ? ext_inc : flash;
    v_sh   = sel_fix ? vfix : vin;
    v_dac  = dac0;
    for (int j = 0; j < M; j++) if (inc_en[j]) v_dac = v_dac + incr[j];
  end

  always @(posedge clk) begin
    therm <= flash;
    vres  <= gain * (v_sh + noise_sample() - v_dac);
  end

endmodule
