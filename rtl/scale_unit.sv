// scale_unit: final step of the calibration. Accuracy bootstrapping leaves
// the converter linear but with a small overall gain and offset error. This
// unit removes both with a two-point measurement of a reference signal:
//
//   1. The analog side applies reference level "lo" (ref_sel = 1), then "hi"
//      (ref_sel = 2); after SETTLE cycles each is converted once:
//      C_lo, C_hi. t_lo and t_hi are the codes the two levels should give.
//   2. Gain: g = (t_hi - t_lo) / (C_hi - C_lo), unsigned with GF fractional
//      bits, by a restoring divider (one quotient bit per cycle).
//   3. Every weight of every stage is read back over the data bus, multiplied
//      by g (rounded) and written back. Multiplying all weights by a factor
//      scales the whole transfer curve by it.
//   4. The lo level is converted again (C_lo'); the offset t_lo - C_lo',
//      expressed in weight LSBs of the most significant stage (one such LSB
//      is 2**(NB*L) code units, one lsb of the converter) and rounded, is
//      added to all weights of stage L-1. Adding a constant to the weights of
//      one stage shifts the transfer curve.
//
// The method (two-point measurement; scale all weights for gain; add a
// constant to one stage's weights for offset) is the published one. Which
// stage takes the offset, the order of the steps, re-measuring the offset
// after the gain correction, the divider, GF and the reference interface are
// this design's choices. Requires t_hi > t_lo and C_hi > C_lo.
//
// Interface: start (pulse) begins; busy is high while working; done rises
// at the end and stays high until the next start. Reads use rd_en/rd_addr
// with the word returned combinationally on rd_data; writes use
// wr_en/wr_addr/wr_data, shared with the calibration controller.
// Cycle count, from the edge that samples start to the edge that raises done:
//   3*(SETTLE+1) + (GF+2) + 2*L*(M+1) + 2*(M+1)   (187 with the defaults).
module scale_unit #(
  parameter int unsigned L      = cal_pkg::STAGES,
  parameter int unsigned NB     = cal_pkg::BITS_PER_STAGE,
  parameter int unsigned M      = 1 << NB,
  parameter int unsigned W_W    = cal_pkg::WEIGHT_W,
  parameter int unsigned R_W    = cal_pkg::RESULT_W,
  parameter int unsigned A_W    = cal_pkg::WADDR_W,
  parameter int unsigned GF     = 20,
  parameter int unsigned SETTLE = L + 4,
  parameter int unsigned SW     = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned CDW    = $clog2(M + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [1:0]            ref_sel,   // 0: none, 1: lo level, 2: hi level
  input  logic signed [R_W-1:0] t_lo,      // expected code of the lo level
  input  logic signed [R_W-1:0] t_hi,      // expected code of the hi level
  input  logic signed [R_W-1:0] code_in,   // conversion result
  output logic                  rd_en,
  output logic [A_W-1:0]        rd_addr,
  input  logic signed [W_W-1:0] rd_data,
  output logic                  wr_en,
  output logic [A_W-1:0]        wr_addr,
  output logic signed [W_W-1:0] wr_data
);

  localparam int unsigned QW    = GF + 2;          // quotient bits, g < 4
  localparam int unsigned DW    = R_W + QW + 1;    // divider width
  localparam int unsigned PW    = W_W + QW + 1;    // product width
  localparam int unsigned CNT_W = $clog2(((SETTLE > QW) ? SETTLE : QW) + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_LO, S_HI, S_DIV, S_RD, S_WR, S_LO2, S_ORD, S_OWR
  } state_e;

  state_e                 state;
  logic [CNT_W-1:0]       cnt;
  logic signed [R_W-1:0]  c_lo;
  logic [DW-1:0]          rem, den;
  logic [QW-1:0]          g;
  logic [SW-1:0]          stage;
  logic [CDW-1:0]         entry;
  logic signed [W_W-1:0]  w_new, delta;
  logic signed [PW-1:0]   prod;
  logic signed [R_W-1:0]  offs;

  // scaled weight, rounded
  always_comb begin
    prod = PW'(rd_data) * $signed({1'b0, g});
    prod = prod + (PW'(1) <<< (GF - 1));
  end

  // offset in weight LSBs of stage L-1, rounded
  always_comb begin
    offs = t_lo - code_in + (R_W'(1) <<< (NB * L - 1));
    offs = offs >>> (NB * L);
  end

  logic [DW-1:0] den_sh;
  assign den_sh = den << cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      c_lo  <= '0;
      rem   <= '0;
      den   <= '0;
      g     <= '0;
      stage <= '0;
      entry <= '0;
      w_new <= '0;
      delta <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LO;
          cnt   <= CNT_W'(SETTLE);
          done  <= 1'b0;
        end
        S_LO: begin
          if (cnt == '0) begin
            c_lo  <= code_in;
            cnt   <= CNT_W'(SETTLE);
            state <= S_HI;
          end else cnt <= cnt - 1'b1;
        end
        S_HI: begin
          if (cnt == '0) begin
            rem   <= DW'(t_hi - t_lo) << GF;
            den   <= DW'(code_in - c_lo);
            cnt   <= CNT_W'(QW - 1);
            g     <= '0;
            state <= S_DIV;
          end else cnt <= cnt - 1'b1;
        end
        S_DIV: begin
          // restoring division, quotient bit cnt
          if (rem >= den_sh) begin
            rem      <= rem - den_sh;
            g[cnt]   <= 1'b1;
          end
          if (cnt == '0) begin
            stage <= '0;
            entry <= '0;
            state <= S_RD;
          end else cnt <= cnt - 1'b1;
        end
        S_RD: begin
          w_new <= W_W'(prod >>> GF);
          state <= S_WR;
        end
        S_WR: begin
          state <= S_RD;
          if (32'(entry) == M) begin
            entry <= '0;
            if (32'(stage) == L - 1) begin
              cnt   <= CNT_W'(SETTLE);
              state <= S_LO2;
            end else stage <= stage + 1'b1;
          end else entry <= entry + 1'b1;
        end
        S_LO2: begin
          if (cnt == '0) begin
            delta <= W_W'(offs);
            stage <= SW'(L - 1);
            entry <= '0;
            state <= S_ORD;
          end else cnt <= cnt - 1'b1;
        end
        S_ORD: begin
          w_new <= rd_data + delta;
          state <= S_OWR;
        end
        S_OWR: begin
          if (32'(entry) == M) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            entry <= entry + 1'b1;
            state <= S_ORD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = (state != S_IDLE);
    ref_sel = (state == S_HI) ? 2'd2 : (state == S_LO || state == S_LO2) ? 2'd1 : 2'd0;
    rd_en   = (state == S_RD) || (state == S_ORD);
    rd_addr = A_W'({stage, entry});
    wr_en   = (state == S_WR) || (state == S_OWR);
    wr_addr = A_W'({stage, entry});
    wr_data = w_new;
  end

endmodule
