// cal_pkg: constants and types shared by the self-calibrating pipelined A/D
// converter.
//
// The converter is a ring of L nominally identical "minimal+1" stages with an
// inter-stage gain A = 2**NB. Each stage has M = A comparators, M+1 DAC levels
// and therefore a look-up table of M+1 digital weights. The default numbers
// (16 stages, A = 2, 18-bit data bus, 36-bit result bus, 6-bit write address)
// are those of the calibration hardware this design follows. The weight
// format (signed, W_FRAC = 16 fractional bits, so one weight LSB is 2**-16 of
// the input range R) is this design's own choice.
//
// Nominal weights are the ideal DAC levels of a minimal+1 stage:
//   V_DAC[i] = (i - 1/2) / A,  i = 0 .. M
// which for A = 2 gives -0.25, 0.25 and 0.75. A stage with a negative gain
// (A = -2**NB, NEG_GAIN set in the modules) keeps its residue in range with
//   V_DAC[i] = (i + 1/2) / |A|
// (0.25, 0.75 and 1.25 for A = -2): the minimal design's levels (1/2 and 1)
// shifted down by 1/(2|A|), plus one level.
package cal_pkg;

  // Number of stages in the ring.
  parameter int unsigned STAGES         = 16;
  // Bits per stage: inter-stage gain A = 2**BITS_PER_STAGE.
  parameter int unsigned BITS_PER_STAGE = 1;
  // Weight / data bus width and number of fractional bits of a weight.
  parameter int unsigned WEIGHT_W       = 18;
  parameter int unsigned WEIGHT_FRAC    = 16;
  // Result bus width.
  parameter int unsigned RESULT_W       = 36;
  // Write address width: {stage, entry}.
  parameter int unsigned WADDR_W        = 6;

  // Nominal weight i of a stage with nb bits, in weight LSBs (2**-frac):
  //   (i -+ 1/2) / 2**nb * 2**frac = (2*i -+ 1) * 2**(frac - nb - 1)
  function automatic longint nominal_weight(input int unsigned i,
                                        input int unsigned nb,
                                        input int unsigned frac,
                                        input bit          neg = 1'b0);
    return (2 * longint'(i) + (neg ? 1 : -1)) * (64'sd1 <<< (frac - nb - 1));
  endfunction

  // Operations the control unit asks of the arithmetic unit.
  typedef enum logic [1:0] {
    ALU_NOP   = 2'd0,  // hold
    ALU_ACC   = 2'd1,  // accumulate the data bus word (first word replaces)
    ALU_ZERO  = 2'd2,  // C[0] := accumulator, W := nominal W[0]
    ALU_STEP  = 2'd3   // W := W + (C[0] - accumulator) / N_AV
  } alu_op_e;

endpackage
