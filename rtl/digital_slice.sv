// digital_slice: one stage of the pipelined digital data path that forms the
// corrected conversion result,
//   CR = [[[W_{L-1}] A + W_{L-2}] A + ... ] A + W_0       (scaled by A^-L)
// Each slice turns its stage's flash thermometer code into the local code,
// looks the weight up in its table, adds it to the partial result arriving
// on the result bus from the previous (more significant) slice and
// multiplies by A = 2**NB, which is a shift of the bit lines (A = -2**NB
// with NEG_GAIN: shift and negate). The sum is
// registered, so the slices form a pipeline that keeps step with the analog
// stages.
//
// The weight is added with its LSB at the LSB of the result bus: this is the
// division by A^L of the structure this design follows (the binary point of
// the result bus lies W_FRAC + NB*L bits above its LSB).
//
// For calibration the slices are arranged in a ring. force_zero makes this
// slice the first (most significant) of the converter by replacing the
// incoming partial result with zero. gate_en puts bits
// [GATE_SHIFT +: W_W] of this slice's registered output on the data bus; with
// GATE_SHIFT = NB*(L+1) the word there is the converted value divided by A, in
// weight units, as the arithmetic unit needs it. Unselected slices drive
// zero, so the data bus is the OR of all gate outputs.
//
// Timing: therm and psum_in belong to the same sample in the same cycle;
// psum_out is valid one clock later. Latency one cycle per slice.
module digital_slice
#(
  parameter int unsigned L          = cal_pkg::STAGES,
  parameter int unsigned NB         = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M          = 1 << NB,
  parameter int unsigned W_W        = cal_pkg::WEIGHT_W,
  parameter int unsigned W_FRAC     = cal_pkg::WEIGHT_FRAC,
  parameter int unsigned R_W        = cal_pkg::RESULT_W,
  parameter int unsigned A_W        = cal_pkg::WADDR_W,
  parameter int unsigned STAGE      = 0,
  parameter int unsigned GATE_SHIFT = NB * (L + 1),
  parameter bit          NEG_GAIN   = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M-1:0]          therm,        // flash code of this stage
  input  logic signed [R_W-1:0] psum_in,      // result bus from previous slice
  input  logic                  force_zero,   // this slice starts the conversion
  input  logic                  gate_en,      // drive the data bus
  output logic signed [R_W-1:0] psum_out,     // result bus to next slice
  output logic signed [W_W-1:0] gate_out,     // contribution to the data bus
  // weight table write port (shared data bus and write address)
  input  logic                  load_nominal,
  input  logic                  wr_en,
  input  logic [A_W-1:0]        wr_addr,
  input  logic signed [W_W-1:0] wr_data,
  // weight table read-back
  input  logic                  rd_en,
  input  logic [A_W-1:0]        rd_addr,
  output logic signed [W_W-1:0] rd_data
);

  localparam int unsigned CDW = $clog2(M + 1);

  logic [CDW-1:0]        code;
  logic signed [W_W-1:0] weight;
  logic signed [R_W-1:0] sum;

  thermo_to_bin #(.M(M), .CDW(CDW)) u_t2b (
    .therm (therm),
    .code  (code)
  );

  weight_lut #(
    .NB(NB), .M(M), .W_W(W_W), .W_FRAC(W_FRAC), .A_W(A_W), .STAGE(STAGE), .CDW(CDW),
    .NEG_GAIN(NEG_GAIN)
  ) u_lut (
    .clk          (clk),
    .rst_n        (rst_n),
    .load_nominal (load_nominal),
    .code         (code),
    .weight       (weight),
    .wr_en        (wr_en),
    .wr_addr      (wr_addr),
    .wr_data      (wr_data),
    .rd_en        (rd_en),
    .rd_addr      (rd_addr),
    .rd_data      (rd_data)
  );

  always_comb sum = (force_zero ? '0 : psum_in) + R_W'(weight);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) psum_out <= '0;
    else        psum_out <= NEG_GAIN ? -(sum <<< NB) : (sum <<< NB);
  end

  assign gate_out = gate_en ? psum_out[GATE_SHIFT +: W_W] : '0;

endmodule
