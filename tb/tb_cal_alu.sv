// tb_cal_alu: checks the arithmetic unit for N_AV = 1 and N_AV = 4 against a
// reference computed in the testbench. For each simulated stage it sums
// N_AV random data-bus words as C[0], then for i = 1 .. 2 sums N_AV words as
// C[i] and expects
//   W[0] = nominal (-16384), W[i] = W[i-1] + round((C[0] - C[i]) / N_AV)
// on w_out after each ALU_STEP. A third unit with negative gain (NEG_GAIN,
// N_AV = 1) must give W[0] = 16384 and W[i] = W[i-1] + (C[i] - C[0]).
module tb_cal_alu;

  logic clk = 1'b0, rst_n = 1'b0;
  cal_pkg::alu_op_e op;
  logic first;
  logic signed [17:0] bus, w1, w4, wn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cal_alu #(.AV_LOG2(0)) dut1 (.clk, .rst_n, .op, .first, .bus_in(bus), .w_out(w1));
  cal_alu #(.AV_LOG2(2)) dut4 (.clk, .rst_n, .op, .first, .bus_in(bus), .w_out(w4));
  cal_alu #(.AV_LOG2(0), .NEG_GAIN(1'b1)) dutn (.clk, .rst_n, .op, .first, .bus_in(bus), .w_out(wn));

  // Applies n accumulate cycles of the given words; returns their sum.
  task automatic accumulate(input int n, input int base, output longint sum);
    sum = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      op    = cal_pkg::ALU_ACC;
      first = (k == 0);
      bus   = 18'(base + int'($urandom() % 64) - 32);
      sum  += longint'(bus);
    end
    @(negedge clk);
    op = cal_pkg::ALU_NOP;
    first = 1'b0;
  endtask

  task automatic do_op(input cal_pkg::alu_op_e o);
    @(negedge clk);
    op = o;
    @(negedge clk);
    op = cal_pkg::ALU_NOP;
  endtask

  // Reference: round-half-up division by 2**sh (arithmetic).
  function automatic longint rdiv(input longint v, input int sh);
    if (sh == 0) return v;
    return (v + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  task automatic run_stage(input int nav, input int sh);
    longint c0, ci, w_ref, wn_ref;
    int base0;
    base0 = 30000 + int'($urandom() % 2000);
    // both ALUs see the same words; only the one of matching N_AV is checked
    accumulate(nav, base0, c0);
    do_op(cal_pkg::ALU_ZERO);
    w_ref = -16384;
    wn_ref = 16384;
    if (sh == 0) begin
      checks++;
      if (wn !== 18'(wn_ref)) begin
        failures++;
        $display("FAIL: negative gain W[0] %0d", wn);
      end
    end
    checks++;
    if ((sh == 0 ? w1 : w4) !== 18'(w_ref)) begin
      failures++;
      $display("FAIL: W[0] %0d", sh == 0 ? w1 : w4);
    end
    for (int i = 1; i <= 2; i++) begin
      accumulate(nav, base0 - 32768 * i / 2 + int'($urandom() % 600) - 300, ci);
      do_op(cal_pkg::ALU_STEP);
      w_ref = w_ref + rdiv(c0 - ci, sh);
      wn_ref = wn_ref + (ci - c0);
      if (sh == 0) begin
        checks++;
        if (wn !== 18'(wn_ref)) begin
          failures++;
          $display("FAIL: negative gain W[%0d]=%0d expected %0d", i, wn, wn_ref);
        end
      end
      checks++;
      if ((sh == 0 ? w1 : w4) !== 18'(w_ref)) begin
        failures++;
        $display("FAIL: nav=%0d W[%0d]=%0d expected %0d", nav, i,
                 sh == 0 ? w1 : w4, w_ref);
      end
    end
  endtask

  initial begin
    op = cal_pkg::ALU_NOP; first = 1'b0; bus = '0;
    #12 rst_n = 1'b1;
    for (int s = 0; s < 20; s++) run_stage(1, 0);
    for (int s = 0; s < 20; s++) run_stage(4, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
