// weight_lut: the small look-up table of one converter stage. It holds M+1
// signed weights W[0..M], one per local code cd, and returns W[cd] as the
// stage's term of the conversion result.
//
// Because the digital path multiplies by A between stages (see
// digital_slice), every stage's table holds the same nominal values, the
// ideal DAC levels (i - 1/2)/A: -0.25, 0.25 and 0.75 for A = 2. These are
// loaded by reset and again by load_nominal (first step of the calibration).
// During calibration the arithmetic unit writes new weights over the shared
// data bus; the write address is {stage, entry}, so with 16 stages of 3
// entries it is 6 bits wide. A table accepts a write when the stage field
// equals its STAGE parameter. The address layout and the reset behaviour are
// this design's choices.
//
// A second, addressed read port (rd_en, rd_addr) returns an entry on rd_data
// and zero when another stage is addressed, so that the outputs of all tables
// can be ORed onto the data bus for read-back.
//
// Timing: both reads are combinational from the registered table; a write
// (wr_en high) takes effect at the rising clock edge.
module weight_lut
#(
  parameter int unsigned NB      = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M       = 1 << NB,
  parameter int unsigned W_W     = cal_pkg::WEIGHT_W,
  parameter int unsigned W_FRAC  = cal_pkg::WEIGHT_FRAC,
  parameter int unsigned A_W     = cal_pkg::WADDR_W,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned CDW     = $clog2(M + 1),
  parameter bit          NEG_GAIN = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load_nominal,   // reload the nominal weights
  input  logic [CDW-1:0]        code,           // local code cd of the stage
  output logic signed [W_W-1:0] weight,         // W[cd]
  input  logic                  wr_en,
  input  logic [A_W-1:0]        wr_addr,        // {stage, entry}
  input  logic signed [W_W-1:0] wr_data,
  // read-back onto the data bus (used by the linear scaling)
  input  logic                  rd_en,
  input  logic [A_W-1:0]        rd_addr,        // {stage, entry}
  output logic signed [W_W-1:0] rd_data         // zero unless addressed
);

  localparam int unsigned STW = A_W - CDW;

  logic signed [W_W-1:0] table_q [M+1];

  logic hit;
  assign hit = wr_en && (wr_addr[A_W-1:CDW] == STW'(STAGE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= M; i++) table_q[i] <= W_W'(cal_pkg::nominal_weight(i, NB, W_FRAC, NEG_GAIN));
    end else if (load_nominal) begin
      for (int i = 0; i <= M; i++) table_q[i] <= W_W'(cal_pkg::nominal_weight(i, NB, W_FRAC, NEG_GAIN));
    end else if (hit && (32'(wr_addr[CDW-1:0]) <= M)) begin
      table_q[wr_addr[CDW-1:0]] <= wr_data;
    end
  end

  assign weight = (32'(code) <= M) ? table_q[code] : table_q[M];

  assign rd_data = (rd_en && (rd_addr[A_W-1:CDW] == STW'(STAGE)) && (32'(rd_addr[CDW-1:0]) <= M))
                   ? table_q[rd_addr[CDW-1:0]] : '0;

endmodule
