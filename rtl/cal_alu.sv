// cal_alu: the arithmetic unit of the on-chip calibration. It turns the
// measurements read from the data bus into new weights for the stage under
// calibration, following the accuracy-bootstrapping update
//   D[i] = (C[0] - C[i]) / A,   W[i] = W[i-1] + D[i],   W[0] = nominal.
//
// The data bus already carries C/A in weight units (the gate of the last
// slice selects the bits accordingly), so no divider is needed. Each
// measurement may be the sum of N_AV = 2**AV_LOG2 successive conversions;
// the difference of two sums is divided by N_AV with rounding.
//
// Operations (op, see cal_pkg::alu_op_e), one per clock:
//   ALU_ACC  : acc := (first ? 0 : acc) + bus_in   (first starts a new sum)
//   ALU_ZERO : c0  := acc;  w := nominal W[0]
//   ALU_STEP : w   := w + round((c0 - acc) / N_AV)
// w_out is the register w; it is written back to the table in a later cycle.
// With NEG_GAIN (A = -2**NB) the data bus word is C/|A| and the step becomes
// round((acc - c0) / N_AV), so that D = (C[0] - C[i]) / A keeps its sign.
// The subtraction order C[0] - C[i] (the increments are subtracted from the
// input) and the rounding are this design's choices.
module cal_alu #(
  parameter int unsigned NB      = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned W_W     = cal_pkg::WEIGHT_W,
  parameter int unsigned W_FRAC  = cal_pkg::WEIGHT_FRAC,
  parameter int unsigned AV_LOG2 = 0,
  parameter bit          NEG_GAIN = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cal_pkg::alu_op_e      op,
  input  logic                  first,     // with ALU_ACC: start a new sum
  input  logic signed [W_W-1:0] bus_in,    // data bus
  output logic signed [W_W-1:0] w_out      // running weight for write-back
);

  localparam int unsigned ACC_W = W_W + AV_LOG2 + 1;

  logic signed [ACC_W-1:0] acc, c0, diff, step;
  logic signed [W_W-1:0]   w;

  always_comb begin
    diff = NEG_GAIN ? acc - c0 : c0 - acc;
    if (AV_LOG2 == 0) step = diff;
    else              step = (diff + (ACC_W'(1) <<< (AV_LOG2 - 1))) >>> AV_LOG2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      c0  <= '0;
      w   <= '0;
    end else begin
      unique case (op)
        cal_pkg::ALU_ACC:  acc <= (first ? '0 : acc) + ACC_W'(bus_in);
        cal_pkg::ALU_ZERO: begin
          c0 <= acc;
          w  <= W_W'(cal_pkg::nominal_weight(0, NB, W_FRAC, NEG_GAIN));
        end
        cal_pkg::ALU_STEP: w <= w + W_W'(step);
        default: ;
      endcase
    end
  end

  assign w_out = w;

endmodule
