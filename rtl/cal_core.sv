// cal_core: the digital half of the self-calibrating pipelined converter: L
// digital slices (one per analog stage, each with its weight table, adder and
// shift-by-A register), the arithmetic unit and the control unit, joined by
// the result bus, the data bus and the write address.
//
// The slices form a ring: slice k takes the partial result of slice k+1, and
// slice L-1 that of slice 0. Which slice starts a conversion (force to zero)
// and which one ends it decides the order of significance:
//  * normal operation: slice L-1 starts, slice 0 ends; the registered output
//    of slice 0 is the corrected conversion result code_out;
//  * calibration of stage l: slice l-1 (L-1 for l = 0) starts and slice l
//    ends and drives the data bus, while analog stage l samples Vfix with its
//    DAC increments under control of ext_inc (sel_fix/ext_en of that stage).
// ring_closed asks the analog side to feed the residue of stage 0 back to
// stage L-1 instead of the external input; it is high during calibration.
//
// After calibration, scale_start runs scale_unit: it asks the analog side to
// apply two reference levels (ref_sel), compares their codes with t_lo and
// t_hi, and corrects the overall gain and offset by rewriting the weights.
// The tables are read back over the same data bus (each table drives it only
// when addressed) and written over the same write port as during
// calibration. Calibration and scaling exclude each other.
//
// code_out: signed, RESULT_W bits, binary point W_FRAC + NB*L bits above the
// LSB (so 2**32 represents the full input range R for the default sizes).
// A sample taken by stage L-1 at a clock edge appears on code_out L clock
// edges later. code_valid is high in normal operation once the pipeline has
// refilled (L cycles) after reset or calibration. One conversion per clock.
//
// NEG_GAIN selects stages of gain A = -2**NB. The slices then multiply by -A
// (shift and negate) and the update of the arithmetic unit changes sign. With
// an even L the product of all gains is positive, so code_out, the data bus
// word and the scaling work as for positive gains; an odd L is rejected at
// elaboration.
//
// The ring connection, the force-to-zero and the gate follow the calibration
// hardware this design is based on; the valid flag is this design's own.
module cal_core #(
  parameter int unsigned L       = cal_pkg::STAGES,
  parameter int unsigned NB      = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M       = 1 << NB,
  parameter int unsigned W_W     = cal_pkg::WEIGHT_W,
  parameter int unsigned W_FRAC  = cal_pkg::WEIGHT_FRAC,
  parameter int unsigned R_W     = cal_pkg::RESULT_W,
  parameter int unsigned A_W     = cal_pkg::WADDR_W,
  parameter int unsigned AV_LOG2 = 0,
  parameter int unsigned N_IT    = 1,
  parameter int unsigned SW      = (L > 1) ? $clog2(L) : 1,
  parameter bit          NEG_GAIN = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cal_start,
  input  logic                     cal_keep,     // with cal_start: refine, no reload
  // gain/offset correction (two-point measurement of a reference)
  input  logic                     scale_start,
  output logic                     scale_busy,
  output logic                     scale_done,
  output logic [1:0]               ref_sel,      // 1: apply ref lo, 2: ref hi
  input  logic signed [R_W-1:0]    t_lo,         // code expected for ref lo
  input  logic signed [R_W-1:0]    t_hi,         // code expected for ref hi
  output logic                     cal_busy,
  output logic                     cal_done,
  // analog stage interface
  input  logic [L-1:0][M-1:0]      therm,        // flash code of each stage
  output logic [L-1:0]             sel_fix,      // stage samples Vfix
  output logic [L-1:0]             ext_en,       // stage DAC under external control
  output logic [M-1:0]             ext_inc,      // increments to enable
  output logic                     ring_closed,  // stage L-1 input := stage 0 residue
  // conversion result
  output logic signed [R_W-1:0]    code_out,
  output logic                     code_valid
);

  logic signed [R_W-1:0] psum [L];
  logic signed [W_W-1:0] gate [L];
  logic signed [W_W-1:0] rdat [L];
  logic signed [W_W-1:0] data_bus;     // gated measurement or table word
  logic signed [W_W-1:0] wr_data, cal_wdata, sc_wdata;
  logic [A_W-1:0]        wr_addr, cal_waddr, sc_waddr, rd_addr;
  logic                  wr_en, cal_wr, sc_wr, rd_en, load_nominal, alu_first;
  cal_pkg::alu_op_e      alu_op;
  logic [SW-1:0]         cal_stage, first_stage, gate_stage;

  cal_control #(
    .L(L), .NB(NB), .M(M), .A_W(A_W), .AV_LOG2(AV_LOG2), .N_IT(N_IT), .SW(SW)
  ) u_ctrl (
    .clk, .rst_n,
    .start        (cal_start && !scale_busy),
    .keep         (cal_keep),
    .busy         (cal_busy),
    .done         (cal_done),
    .cal_stage    (cal_stage),
    .ext_inc      (ext_inc),
    .alu_op       (alu_op),
    .alu_first    (alu_first),
    .load_nominal (load_nominal),
    .wr_en        (cal_wr),
    .wr_addr      (cal_waddr)
  );

  cal_alu #(.NB(NB), .W_W(W_W), .W_FRAC(W_FRAC), .AV_LOG2(AV_LOG2), .NEG_GAIN(NEG_GAIN)) u_alu (
    .clk, .rst_n,
    .op     (alu_op),
    .first  (alu_first),
    .bus_in (data_bus),
    .w_out  (cal_wdata)
  );

  // The gain factor resolves one converter lsb (2**-(NB*L)) with 4 bits to
  // spare: 20 fractional bits for the default 16-bit converter.
  scale_unit #(
    .L(L), .NB(NB), .M(M), .W_W(W_W), .R_W(R_W), .A_W(A_W), .SW(SW),
    .GF(NB * L + 4)
  ) u_scale (
    .clk, .rst_n,
    .start   (scale_start && !cal_busy),
    .busy    (scale_busy),
    .done    (scale_done),
    .ref_sel (ref_sel),
    .t_lo    (t_lo),
    .t_hi    (t_hi),
    .code_in (psum[0]),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (data_bus),
    .wr_en   (sc_wr),
    .wr_addr (sc_waddr),
    .wr_data (sc_wdata)
  );

  // Table write port: the calibration controller or the scaling unit.
  always_comb begin
    wr_en   = cal_wr || sc_wr;
    wr_addr = scale_busy ? sc_waddr : cal_waddr;
    wr_data = scale_busy ? sc_wdata : cal_wdata;
  end

  always_comb begin
    if (cal_busy) begin
      first_stage = (cal_stage == '0) ? SW'(L - 1) : cal_stage - 1'b1;
      gate_stage  = cal_stage;
    end else begin
      first_stage = SW'(L - 1);
      gate_stage  = '0;
    end
    for (int k = 0; k < L; k++) begin
      sel_fix[k] = cal_busy && (32'(cal_stage) == k);
      ext_en[k]  = sel_fix[k];
    end
    ring_closed = cal_busy;
  end

  if (NEG_GAIN && (L % 2 != 0)) begin : g_odd_ring
    $error("cal_core: negative stage gains need an even number of stages");
  end

  for (genvar k = 0; k < L; k++) begin : g_slice
    digital_slice #(
      .L(L), .NB(NB), .M(M), .W_W(W_W), .W_FRAC(W_FRAC), .R_W(R_W), .A_W(A_W),
      .STAGE(k), .NEG_GAIN(NEG_GAIN)
    ) u_slice (
      .clk, .rst_n,
      .therm        (therm[k]),
      .psum_in      (psum[(k + 1) % L]),
      .force_zero   (32'(first_stage) == k),
      .gate_en      (cal_busy && 32'(gate_stage) == k),
      .psum_out     (psum[k]),
      .gate_out     (gate[k]),
      .load_nominal (load_nominal),
      .wr_en        (wr_en),
      .wr_addr      (wr_addr),
      .wr_data      (wr_data),
      .rd_en        (rd_en),
      .rd_addr      (rd_addr),
      .rd_data      (rdat[k])
    );
  end

  // Data bus: only the selected slice (gate during calibration, table
  // read-back during scaling) drives a non-zero word.
  always_comb begin
    data_bus = '0;
    for (int k = 0; k < L; k++) data_bus = data_bus | gate[k] | rdat[k];
  end

  // Valid once the pipeline has refilled in normal operation.
  localparam int unsigned VC_W = $clog2(L + 1);
  logic [VC_W-1:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             fill <= '0;
    else if (cal_busy || scale_busy) fill <= '0;
    else if (32'(fill) < L) fill <= fill + 1'b1;
  end

  assign code_out   = psum[0];
  assign code_valid = !cal_busy && !scale_busy && (32'(fill) == L);

  // The two table writers never work at the same time.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(cal_wr && sc_wr));

endmodule
