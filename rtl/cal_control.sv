// cal_control: the control unit of the on-chip calibration. It runs the
// accuracy-bootstrapping algorithm on the ring of stages:
//
//   load the nominal weights into every table
//   repeat N_IT times:
//     for stage l = 0 .. L-1:
//       for i = 0 .. M:
//         hold stage l's sample/hold at Vfix and enable DAC increment i alone
//         (none for i = 0); wait SETTLE cycles for the ring to fill; sum N_AV
//         conversions from the data bus
//         i = 0: C[0] := sum, W := nominal W[0]
//         i > 0: W := W + (C[0] - C[i]) / N_AV, then write W into entry i of
//                stage l's table
//
// While stage l is calibrated the converter is the ring l-1, ..., 0, L-1, ...,
// l+1 followed by the flash of stage l: cal_stage tells the core which slice
// starts the conversion (l-1) and which one drives the data bus (l). The
// order of stages, the zero-level measurement and the weight update follow
// the algorithm; the settle time, the state encoding and the write timing are
// this design's choices.
//
// Interface: start (one-cycle pulse in IDLE) begins a calibration; busy is
// high until it ends; done rises then and stays high until the next start.
// If keep is high with start, the nominal weights are not reloaded and the
// run refines the weights already in the tables (a further pass of the
// algorithm, started at run time instead of through N_IT).
// Cycle count of one calibration:
//   1 + N_IT * L * ((M+1)*(SETTLE + N_AV + 1) + M)
module cal_control #(
  parameter int unsigned L       = cal_pkg::STAGES,
  parameter int unsigned NB      = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M       = 1 << NB,
  parameter int unsigned A_W     = cal_pkg::WADDR_W,
  parameter int unsigned AV_LOG2 = 0,
  parameter int unsigned N_IT    = 1,
  parameter int unsigned SETTLE  = L + 4,
  parameter int unsigned SW      = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned CDW     = $clog2(M + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               keep,          // with start: keep the current weights
  output logic               busy,
  output logic               done,
  output logic [SW-1:0]      cal_stage,     // stage under calibration
  output logic [M-1:0]       ext_inc,       // DAC increments of that stage
  output cal_pkg::alu_op_e   alu_op,
  output logic               alu_first,
  output logic               load_nominal,
  output logic               wr_en,
  output logic [A_W-1:0]     wr_addr
);

  localparam int unsigned N_AV = 1 << AV_LOG2;
  localparam int unsigned CNT_W = $clog2(SETTLE + N_AV + 1);
  localparam int unsigned IT_W  = (N_IT > 1) ? $clog2(N_IT) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_SETTLE, S_MEAS, S_UPDATE, S_WRITE
  } state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [CDW-1:0]   meas;     // i: 0 = zero level, 1..M = increment
  logic [IT_W-1:0]  iter;
  logic             keep_q;   // this run refines the present weights

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      meas      <= '0;
      iter      <= '0;
      cal_stage <= '0;
      done      <= 1'b0;
      keep_q    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_INIT;
          done   <= 1'b0;
          keep_q <= keep;
        end
        S_INIT: begin
          cal_stage <= '0;
          iter      <= '0;
          meas      <= '0;
          cnt       <= CNT_W'(SETTLE - 1);
          state     <= S_SETTLE;
        end
        S_SETTLE: begin
          if (cnt == '0) begin
            cnt   <= CNT_W'(N_AV - 1);
            state <= S_MEAS;
          end else cnt <= cnt - 1'b1;
        end
        S_MEAS: begin
          if (cnt == '0) state <= S_UPDATE;
          else           cnt   <= cnt - 1'b1;
        end
        S_UPDATE: begin
          if (meas == '0) begin
            meas  <= 1;
            cnt   <= CNT_W'(SETTLE - 1);
            state <= S_SETTLE;
          end else state <= S_WRITE;
        end
        S_WRITE: begin
          cnt   <= CNT_W'(SETTLE - 1);
          state <= S_SETTLE;
          if (32'(meas) == M) begin
            meas <= '0;
            if (32'(cal_stage) == L - 1) begin
              cal_stage <= '0;
              if (32'(iter) == N_IT - 1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else iter <= iter + 1'b1;
            end else cal_stage <= cal_stage + 1'b1;
          end else meas <= meas + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy         = (state != S_IDLE);
    load_nominal = (state == S_INIT) && !keep_q;
    for (int k = 0; k < M; k++) ext_inc[k] = busy && (32'(meas) == k + 1);
    alu_op       = cal_pkg::ALU_NOP;
    alu_first    = 1'b0;
    if (state == S_MEAS) begin
      alu_op    = cal_pkg::ALU_ACC;
      alu_first = (32'(cnt) == N_AV - 1);
    end else if (state == S_UPDATE) begin
      alu_op = (meas == '0) ? cal_pkg::ALU_ZERO : cal_pkg::ALU_STEP;
    end
    wr_en   = (state == S_WRITE);
    wr_addr = A_W'({cal_stage, meas});
  end

  // A write always targets an existing table entry.
  a_wr_entry: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (meas != '0 && 32'(meas) <= M));

endmodule
