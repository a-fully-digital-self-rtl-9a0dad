// tb_scale_unit: checks the gain/offset correction at the default size
// (16 stages, A = 2) against a converter modelled in the testbench: the code
// of a reference is the sum of one weight per stage, weight of stage k times
// 2**(k+1), as in the digital path; the lo and hi references select fixed
// codes per stage. The tables start at the nominal weights scaled by 1.03
// plus small random deviations, so both gain and offset are wrong.
// Checks:
//  * the quotient equals floor(((t_hi - t_lo) * 2**20) / (C_hi - C_lo));
//  * every weight is rewritten once as round(W * g / 2**20), in order, each
//    write preceded by the read of the same address;
//  * the weights of stage 15 then get the rounded offset added;
//  * afterwards lo converts to t_lo within 0.5 lsb and hi to t_hi within 2 lsb
//    (lsb = 2**16 code units);
//  * ref_sel sequence lo, hi, lo and the cycle count
//    3*(SETTLE+1) + 22 + 2*L*(M+1) + 2*(M+1).
module tb_scale_unit;

  localparam int unsigned L = 16, M = 2, GF = 20;
  localparam int unsigned SETTLE = L + 4;
  localparam int unsigned EXP_CYC = 3 * (SETTLE + 1) + (GF + 2) + 2 * L * (M + 1) + 2 * (M + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, rd_en, wr_en;
  logic [1:0] ref_sel;
  logic signed [35:0] t_lo, t_hi, code_in;
  logic [5:0] rd_addr, wr_addr;
  logic signed [17:0] rd_data, wr_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scale_unit dut (
    .clk, .rst_n, .start, .busy, .done, .ref_sel, .t_lo, .t_hi, .code_in,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  longint w [L][M+1];
  int     c_lo_sel [L];
  int     c_hi_sel [L];

  function automatic longint conv(input bit hi);
    longint s;
    s = 0;
    for (int k = 0; k < L; k++) s += w[k][hi ? c_hi_sel[k] : c_lo_sel[k]] <<< (k + 1);
    return s;
  endfunction

  always_comb begin
    code_in = (ref_sel == 2'd2) ? 36'(conv(1'b1)) : (ref_sel == 2'd1) ? 36'(conv(1'b0)) : 36'sd0;
    rd_data = (rd_en && 32'(rd_addr[1:0]) <= M) ? 18'(w[rd_addr[5:2]][rd_addr[1:0]]) : 18'sd0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint g_ref, c_lo, c_hi, exp_w [L][M+1];
  int n_wr = 0, bad_wr = 0, seq_err = 0, cyc;
  logic [5:0] last_rd;
  logic [1:0] last_ref = 2'd0;
  int ref_changes [$];

  always @(posedge clk) if (rst_n) begin
    if (rd_en) last_rd <= rd_addr;
    if (wr_en) begin
      if (wr_addr != last_rd) seq_err++;
      if (longint'(wr_data) != exp_w[wr_addr[5:2]][wr_addr[1:0]]) begin
        bad_wr++;
        $display("write %0d/%0d = %0d expected %0d", wr_addr[5:2], wr_addr[1:0], wr_data,
                 exp_w[wr_addr[5:2]][wr_addr[1:0]]);
      end
      w[wr_addr[5:2]][wr_addr[1:0]] = longint'(wr_data);
      n_wr++;
      // after the gain pass, the offset pass adds delta to stage 15
      if (n_wr == L * (M + 1)) begin
        longint off, delta;
        off   = longint'(t_lo) - conv(1'b0);
        delta = (off + (longint'(1) <<< 15)) >>> 16;
        for (int i = 0; i <= M; i++) exp_w[L-1][i] = w[L-1][i] + delta;
      end
    end
    if (ref_sel != last_ref) begin
      if (ref_sel != 2'd0) ref_changes.push_back(int'(ref_sel));
      last_ref <= ref_sel;
    end
  end

  initial begin
    for (int k = 0; k < L; k++) begin
      for (int i = 0; i <= M; i++)
        w[k][i] = longint'(real'((2 * i - 1) * 16384) * 1.03) + longint'($urandom_range(199)) - 100;
      c_lo_sel[k] = int'($urandom() % 3);
      c_hi_sel[k] = int'($urandom() % 3);
    end
    c_lo_sel[L-1] = 0;   // lo reference ~ 0.1, hi ~ 0.9 of the range
    c_hi_sel[L-1] = 2;
    c_lo = conv(1'b0);
    c_hi = conv(1'b1);
    t_lo = 36'(c_lo - 64'sd3000000);
    t_hi = 36'(c_lo - 64'sd3000000 + (c_hi - c_lo) * 97 / 100);
    g_ref = ((longint'(t_hi) - longint'(t_lo)) <<< GF) / (c_hi - c_lo);
    for (int k = 0; k < L; k++)
      for (int i = 0; i <= M; i++)
        exp_w[k][i] = (w[k][i] * g_ref + (longint'(1) <<< (GF - 1))) >>> GF;
    #12 rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(!busy, "idle when done");
    check(longint'(dut.g) == g_ref, $sformatf("gain factor %0d expected %0d", dut.g, g_ref));
    check(n_wr == L * (M + 1) + M + 1, $sformatf("%0d writes", n_wr));
    check(bad_wr == 0, "every written weight as expected");
    check(seq_err == 0, "every write follows the read of its address");
    check(ref_changes.size() == 3 && ref_changes[0] == 1 && ref_changes[1] == 2 && ref_changes[2] == 1,
          "reference sequence lo, hi, lo");
    begin : result
      longint e_lo, e_hi;
      e_lo = conv(1'b0) - longint'(t_lo);
      e_hi = conv(1'b1) - longint'(t_hi);
      $display("after correction: lo error %0d, hi error %0d code units (1 lsb = 65536)", e_lo, e_hi);
      check(e_lo <= 32768 && e_lo >= -32768, "lo reference within 0.5 lsb");
      check(e_hi <= 131072 && e_hi >= -131072, "hi reference within 2 lsb");
    end
    $display("correction took %0d cycles, expected %0d", cyc, EXP_CYC);
    check(cyc == EXP_CYC, "cycle count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (EXP_CYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
