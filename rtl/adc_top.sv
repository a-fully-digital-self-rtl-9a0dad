// adc_top: a self-calibrating pipelined A/D converter. Sixteen nominally
// identical 1-bit-per-stage "minimal+1" analog stages (gain 2, two comparators
// each) are followed by a pipelined digital path that adds one table weight
// per stage; the tables are measured on chip by the accuracy-bootstrapping
// algorithm, so comparator, DAC and gain errors of the analog stages are
// corrected in the digital domain without trimming.
//
// Contents: L instances of adc_stage_model (behavioural analog stages, with
// random component errors fixed per instance by SEED + stage index) and one
// cal_core (synthesizable digital part). This module is therefore a
// simulation model of the whole converter, not a synthesizable top: a chip
// would place the analog stages, the Vin/ring multiplexer and the Vfix source
// in the analog domain and cal_core in logic.
//
// Analog input of stage L-1: the residue of stage 0 while the core
// calibrates (ring_closed), vref_lo / vref_hi while the scaling unit measures
// them (ref_sel), vin otherwise. Stage k < L-1 takes the residue of stage k+1.
//
// Interface: vin and vfix are real voltages in units of the range R (input
// range 0..1). Pulse cal_start for one cycle to calibrate; cal_done rises when
// the tables are loaded. With cal_keep high during the cal_start pulse the
// run starts from the present weights (a further refining pass). After
// calibration, a scale_start pulse corrects gain and offset so that vref_lo
// and vref_hi convert to t_lo and t_hi; scale_done rises when finished.
// code_out is the corrected result, 2**(W_FRAC+NB*L) per R (2**32 with the
// defaults); a vin sampled at a clock edge appears L edges later; code_valid
// marks results of normal operation. NEG_GAIN builds the converter from
// stages of gain -2**NB instead (even L only); vfix = 1/(2*2**NB) suits
// either sign.
//
// Defaults: 16 stages, A = 2, 1 % errors on gains, trip points and DAC
// levels, input-referred noise 0.1 lsb, one average, one iteration, as in the
// base case the method was evaluated with. The uniform error distribution and
// the choice of vfix by the user are this design's own.
module adc_top #(
  parameter int unsigned L       = cal_pkg::STAGES,
  parameter int unsigned NB      = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M       = 1 << NB,
  parameter int unsigned W_W     = cal_pkg::WEIGHT_W,
  parameter int unsigned W_FRAC  = cal_pkg::WEIGHT_FRAC,
  parameter int unsigned R_W     = cal_pkg::RESULT_W,
  parameter int unsigned A_W     = cal_pkg::WADDR_W,
  parameter int unsigned AV_LOG2 = 0,
  parameter int unsigned N_IT    = 1,
  parameter real         ERR_A   = 0.01,
  parameter real         ERR_V   = 0.01,
  parameter real         ERR_D   = 0.01,
  parameter real         NOISE   = 0.1 / real'(64'd1 << (NB * L)),
  parameter int unsigned SEED    = 1,
  parameter bit          NEG_GAIN = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  real                   vin,
  input  real                   vfix,
  input  real                   vref_lo,     // reference levels for the
  input  real                   vref_hi,     // gain/offset correction
  input  logic                  cal_start,
  input  logic                  cal_keep,
  output logic                  cal_busy,
  output logic                  cal_done,
  input  logic                  scale_start,
  output logic                  scale_busy,
  output logic                  scale_done,
  input  logic signed [R_W-1:0] t_lo,        // codes vref_lo/vref_hi should give
  input  logic signed [R_W-1:0] t_hi,
  output logic signed [R_W-1:0] code_out,
  output logic                  code_valid
);

  logic [L-1:0][M-1:0] therm;
  logic [L-1:0]        sel_fix, ext_en;
  logic [M-1:0]        ext_inc;
  logic                ring_closed;
  logic [1:0]          ref_sel;
  real                 vres    [L];
  real                 stage_in[L];

  always_comb begin
    for (int k = 0; k < L - 1; k++) stage_in[k] = vres[k + 1];
    if (ring_closed)          stage_in[L-1] = vres[0];
    else if (ref_sel == 2'd1) stage_in[L-1] = vref_lo;
    else if (ref_sel == 2'd2) stage_in[L-1] = vref_hi;
    else                      stage_in[L-1] = vin;
  end

  for (genvar k = 0; k < L; k++) begin : g_stage
    adc_stage_model #(
      .NB(NB), .M(M), .ERR_A(ERR_A), .ERR_V(ERR_V), .ERR_D(ERR_D),
      .NOISE(NOISE), .SEED(SEED * 1000 + k), .NEG_GAIN(NEG_GAIN)
    ) u_stage (
      .clk,
      .vin     (stage_in[k]),
      .vfix    (vfix),
      .sel_fix (sel_fix[k]),
      .ext_en  (ext_en[k]),
      .ext_inc (ext_inc),
      .therm   (therm[k]),
      .vres    (vres[k])
    );
  end

  cal_core #(
    .L(L), .NB(NB), .M(M), .W_W(W_W), .W_FRAC(W_FRAC), .R_W(R_W), .A_W(A_W),
    .AV_LOG2(AV_LOG2), .N_IT(N_IT), .NEG_GAIN(NEG_GAIN)
  ) u_core (
    .clk, .rst_n,
    .cal_start   (cal_start),
    .cal_keep    (cal_keep),
    .cal_busy    (cal_busy),
    .cal_done    (cal_done),
    .therm       (therm),
    .sel_fix     (sel_fix),
    .ext_en      (ext_en),
    .ext_inc     (ext_inc),
    .ring_closed (ring_closed),
    .scale_start (scale_start),
    .scale_busy  (scale_busy),
    .scale_done  (scale_done),
    .ref_sel     (ref_sel),
    .t_lo        (t_lo),
    .t_hi        (t_hi),
    .code_out    (code_out),
    .code_valid  (code_valid)
  );

endmodule
