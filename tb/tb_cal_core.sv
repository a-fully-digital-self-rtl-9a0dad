// tb_cal_core: checks the digital core at its default size (16 stages, A = 2)
// against a ring of behavioural analog stages built in the testbench. All
// stages are ideal except stage 0, whose DAC increments and trip points carry
// 1 % errors (no gain error, no noise).
//  * Before calibration every table holds the nominal weights.
//  * After one calibration, stage 0's table must hold
//      W[0] = -0.25,  W[1] = W[0] + incr[0],  W[2] = W[1] + incr[1]
//    (the actual increments of the stage, read from the model), and all other
//    tables the nominal values, each within 2 weight LSBs.
//  * Conversions of random inputs must satisfy
//      vin - 1.1 lsb <= code_out / 2**32 <= vin + 0.1 lsb.
//  * During calibration exactly one slice drives the data bus, and
//    sel_fix/ext_en select only the stage being calibrated.
module tb_cal_core;

  localparam int unsigned L = 16, M = 2;
  localparam real LSB = 1.0 / 65536.0;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic cal_busy, cal_done, ring_closed, code_valid;
  logic [L-1:0][M-1:0] therm;
  logic [L-1:0] sel_fix, ext_en;
  logic [M-1:0] ext_inc;
  logic signed [35:0] code_out;
  real vin = 0.5, vfix = 0.25;
  real vres [L];
  real sin_ [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_comb begin
    for (int k = 0; k < L - 1; k++) sin_[k] = vres[k + 1];
    sin_[L-1] = ring_closed ? vres[0] : vin;
  end

  adc_stage_model #(.ERR_A(0.0), .ERR_V(0.01), .ERR_D(0.01), .NOISE(0.0), .SEED(5)) st0 (
    .clk, .vin(sin_[0]), .vfix, .sel_fix(sel_fix[0]), .ext_en(ext_en[0]), .ext_inc,
    .therm(therm[0]), .vres(vres[0])
  );
  for (genvar k = 1; k < L; k++) begin : g_st
    adc_stage_model #(.ERR_A(0.0), .ERR_V(0.0), .ERR_D(0.0), .NOISE(0.0)) st (
      .clk, .vin(sin_[k]), .vfix, .sel_fix(sel_fix[k]), .ext_en(ext_en[k]), .ext_inc,
      .therm(therm[k]), .vres(vres[k])
    );
  end

  logic scale_busy, scale_done;
  logic [1:0] ref_sel;

  cal_core dut (
    .clk, .rst_n, .cal_start, .cal_keep(1'b0), .cal_busy, .cal_done,
    .scale_start(1'b0), .scale_busy, .scale_done, .ref_sel, .t_lo('0), .t_hi('0),
    .therm, .sel_fix, .ext_en, .ext_inc, .ring_closed, .code_out, .code_valid
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Table contents and gate enables, gathered from the slices.
  int   tbl [L][3];
  logic [L-1:0] gate_on;
  for (genvar k = 0; k < L; k++) begin : g_peek
    always_comb begin
      for (int i = 0; i < 3; i++) tbl[k][i] = int'(dut.g_slice[k].u_slice.u_lut.table_q[i]);
      gate_on[k] = dut.g_slice[k].u_slice.gate_en;
    end
  end

  function automatic int w_of(input int k, input int i);
    return tbl[k][i];
  endfunction

  function automatic int iabs(input int x);
    return (x < 0) ? -x : x;
  endfunction

  int nominal [3] = '{-16384, 16384, 49152};
  int bus_err = 0, sel_err = 0, bus_cycles = 0;

  always @(posedge clk) if (cal_busy) begin
    if ($countones(gate_on) != 1 || gate_on != (L'(1) << dut.cal_stage)) bus_err++;
    bus_cycles++;
    if ($countones(sel_fix) != 1 || sel_fix != ext_en || sel_fix != (L'(1) << dut.cal_stage))
      sel_err++;
  end

  task automatic convert_check(input string tag);
    real hist [200];
    for (int e = 0; e < 200 + L; e++) begin
      if (e < 200) begin
        hist[e] = real'($urandom() % 1000000) / 1000000.0;
        vin = hist[e];
      end
      @(posedge clk);
      #1;
      if (e >= L) begin
        real y;
        y = real'(code_out) / 4294967296.0;
        check(code_valid && y <= hist[e - L] + 0.1 * LSB && y >= hist[e - L] - 1.1 * LSB,
              $sformatf("%s: vin %f gave %f", tag, hist[e - L], y));
      end
    end
  endtask

  initial begin
    therm = '0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < L; k++)
      for (int i = 0; i <= M; i++)
        check(w_of(k, i) == nominal[i], $sformatf("reset weight %0d/%0d", k, i));
    repeat (L + 2) @(posedge clk);
    #1;
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    wait (cal_done);
    repeat (L + 2) @(posedge clk);
    #1;
    begin : weights
      real e0, e1, e2;
      e0 = -0.25;
      e1 = e0 + st0.incr[0];
      e2 = e1 + st0.incr[1];
      check(iabs(w_of(0, 0) - int'(e0 * 65536.0)) <= 2, $sformatf("stage 0 W[0]=%0d", w_of(0, 0)));
      check(iabs(w_of(0, 1) - int'(e1 * 65536.0)) <= 2,
            $sformatf("stage 0 W[1]=%0d expected %f", w_of(0, 1), e1 * 65536.0));
      check(iabs(w_of(0, 2) - int'(e2 * 65536.0)) <= 2,
            $sformatf("stage 0 W[2]=%0d expected %f", w_of(0, 2), e2 * 65536.0));
      check(iabs(w_of(0, 2) - 49152) > 20, "stage 0 error was large enough to see");
    end
    for (int k = 1; k < L; k++)
      for (int i = 0; i <= M; i++)
        check(iabs(w_of(k, i) - nominal[i]) <= 2,
              $sformatf("stage %0d W[%0d]=%0d", k, i, w_of(k, i)));
    check(bus_cycles > 0 && bus_err == 0, "one data bus driver during calibration");
    check(sel_err == 0, "Vfix and external DAC control on the calibrated stage only");
    convert_check("after calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
