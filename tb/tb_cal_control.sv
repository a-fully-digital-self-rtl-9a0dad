// tb_cal_control: checks the calibration sequencer with L = 4 stages,
// N_AV = 2 and N_IT = 2 (other sizes default). A monitor follows the outputs
// and checks that
//  * the stages are calibrated in order 0, 1, .., L-1, twice;
//  * per stage the measurements run i = 0 .. M with increment i alone enabled
//    (none for i = 0), each with exactly N_AV accumulate cycles, the first of
//    them flagged, after at least SETTLE cycles with a stable configuration;
//  * i = 0 ends with ALU_ZERO, i > 0 with ALU_STEP followed by a write to
//    address {l, i};
//  * load_nominal is given once, at the start, and not at all for a run
//    started with keep;
//  * busy/done behave and the whole run takes
//    1 + N_IT * L * ((M+1)*(SETTLE + N_AV + 1) + M) cycles.
module tb_cal_control;

  localparam int unsigned L = 4, NB = 1, M = 2, AV = 1, NAV = 2, NIT = 2;
  localparam int unsigned SETTLE = L + 4;
  localparam int unsigned EXP_CYC = 1 + NIT * L * ((M + 1) * (SETTLE + NAV + 1) + M);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, keep = 1'b0;
  logic busy, done, alu_first, load_nominal, wr_en;
  logic [1:0] cal_stage;
  logic [M-1:0] ext_inc;
  cal_pkg::alu_op_e alu_op;
  logic [5:0] wr_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cal_control #(.L(L), .NB(NB), .AV_LOG2(AV), .N_IT(NIT)) dut (
    .clk, .rst_n, .start, .keep, .busy, .done, .cal_stage, .ext_inc, .alu_op,
    .alu_first, .load_nominal, .wr_en, .wr_addr
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [M-1:0] inc_of(input int i);
    return (i == 0) ? '0 : M'(1 << (i - 1));
  endfunction

  int cyc;

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // cycle 1: INIT
    check(busy && load_nominal, "load_nominal in first cycle");
    cyc = 1;
    for (int it = 0; it < NIT; it++) begin
      for (int l = 0; l < L; l++) begin
        for (int i = 0; i <= M; i++) begin
          int stable, nacc;
          stable = 0;
          // settle
          while (alu_op != cal_pkg::ALU_ACC) begin
            @(negedge clk);
            cyc++;
            check(!load_nominal && !wr_en, "no write while settling");
            check(32'(cal_stage) == l && ext_inc == inc_of(i),
                  $sformatf("configuration it %0d stage %0d meas %0d", it, l, i));
            stable++;
          end
          // stable counts the SETTLE cycles plus the step onto the first accumulate
          check(stable == SETTLE + 1, $sformatf("settle time %0d", stable - 1));
          nacc = 0;
          while (alu_op == cal_pkg::ALU_ACC) begin
            check(alu_first == (nacc == 0), "first flag on first accumulate only");
            check(32'(cal_stage) == l && ext_inc == inc_of(i), "configuration while measuring");
            nacc++;
            @(negedge clk);
            cyc++;
          end
          check(nacc == NAV, $sformatf("accumulate cycles %0d", nacc));
          check(alu_op == (i == 0 ? cal_pkg::ALU_ZERO : cal_pkg::ALU_STEP), "update op");
          if (i > 0) begin
            @(negedge clk);
            cyc++;
            check(wr_en && wr_addr == {4'(l), 2'(i)},
                  $sformatf("write of stage %0d entry %0d (addr %0d)", l, i, wr_addr));
          end
        end
      end
    end
    @(negedge clk);
    check(!busy && done, "done and idle at the end");
    $display("calibration %0d cycles, expected %0d", cyc, EXP_CYC);
    check(cyc == EXP_CYC, "cycle count");
    repeat (5) @(negedge clk);
    check(done && !busy && !wr_en, "stays done");
    // a refining run (keep) must not reload the nominal weights
    start = 1'b1;
    keep  = 1'b1;
    @(negedge clk);
    start = 1'b0;
    keep  = 1'b0;
    check(busy && !done && !load_nominal, "refining run starts without reload");
    begin : refine
      int n_load, n_wr;
      n_load = 0; n_wr = 0;
      while (busy) begin
        @(negedge clk);
        if (load_nominal) n_load++;
        if (wr_en) n_wr++;
      end
      check(n_load == 0, "no reload during refining run");
      check(n_wr == NIT * L * M, $sformatf("refining run writes %0d", n_wr));
      check(done, "refining run done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * EXP_CYC + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
