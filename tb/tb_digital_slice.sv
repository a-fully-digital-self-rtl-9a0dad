// tb_digital_slice: checks one slice (stage 3, default sizes) against a
// reference model kept in the testbench:
//   psum_out(next cycle) = ((force_zero ? 0 : psum_in) + W[popcount(therm)]) * 2
//   gate_out             = gate_en ? psum_out[34:17] : 0
// with W the nominal table, changed by random writes over the write port.
// Inputs are random; each registered result is compared one cycle later.
// The table read-back port is checked against the same reference table.
// A second slice with negative gain (NEG_GAIN, nominal table 0.25, 0.75,
// 1.25) sees the same inputs and must give -((...) * 2).
module tb_digital_slice;

  localparam int unsigned R_W = 36;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] therm;
  logic signed [R_W-1:0] psum_in, psum_out;
  logic force_zero, gate_en, load_nominal, wr_en;
  logic signed [17:0] gate_out, wr_data;
  logic [5:0] wr_addr, rd_addr;
  logic rd_en;
  logic signed [17:0] rd_data;
  int checks = 0, failures = 0;
  logic signed [17:0] ref_t [3];
  logic signed [R_W-1:0] exp_psum, exp_psum_n, psum_out_n;
  logic signed [17:0] ref_n [3];
  logic signed [17:0] gate_out_n, rd_data_n;

  always #5 clk = ~clk;

  digital_slice #(.STAGE(3)) dut (
    .clk, .rst_n, .therm, .psum_in, .force_zero, .gate_en, .psum_out, .gate_out,
    .load_nominal, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  digital_slice #(.STAGE(3), .NEG_GAIN(1'b1)) dut_n (
    .clk, .rst_n, .therm, .psum_in, .force_zero, .gate_en, .psum_out(psum_out_n),
    .gate_out(gate_out_n), .load_nominal, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr,
    .rd_data(rd_data_n)
  );

  initial begin
    ref_t[0] = -18'sd16384; ref_t[1] = 18'sd16384; ref_t[2] = 18'sd49152;
    ref_n[0] = 18'sd16384;  ref_n[1] = 18'sd49152; ref_n[2] = 18'sd81920;
    therm = '0; psum_in = '0; force_zero = 1'b0; gate_en = 1'b0;
    load_nominal = 1'b0; wr_en = 1'b0; wr_addr = '0; wr_data = '0;
    rd_en = 1'b0; rd_addr = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int lvl;
      logic signed [R_W-1:0] base;
      @(negedge clk);
      lvl        = int'($urandom() % 3);
      therm      = 2'((1 << lvl) - 1);
      psum_in    = R_W'({$urandom(), $urandom()}) >>> 2;
      force_zero = ($urandom() % 4) == 0;
      gate_en    = ($urandom() % 2) == 0;
      wr_en      = ($urandom() % 8) == 0;
      wr_addr    = {4'((($urandom() % 2) != 0) ? 3 : $urandom() % 16), 2'($urandom() % 3)};
      wr_data    = 18'($urandom());
      rd_en      = ($urandom() % 2) == 0;
      rd_addr    = {4'((($urandom() % 2) != 0) ? 3 : $urandom() % 16), 2'($urandom() % 3)};
      #1;
      checks++;
      if (rd_data !== ((rd_en && rd_addr[5:2] == 4'd3) ? ref_t[rd_addr[1:0]] : 18'sd0)) begin
        failures++;
        $display("FAIL: n=%0d read-back %0d", n, rd_data);
      end
      base       = force_zero ? '0 : psum_in;
      exp_psum   = (base + R_W'(ref_t[lvl])) <<< 1;
      exp_psum_n = -((base + R_W'(ref_n[lvl])) <<< 1);
      checks++;
      if (rd_data_n !== ((rd_en && rd_addr[5:2] == 4'd3) ? ref_n[rd_addr[1:0]] : 18'sd0)) begin
        failures++;
        $display("FAIL: n=%0d negative-gain read-back %0d", n, rd_data_n);
      end
      @(posedge clk);
      if (wr_en && wr_addr[5:2] == 4'd3) begin
        ref_t[wr_addr[1:0]] = wr_data;
        ref_n[wr_addr[1:0]] = wr_data;
      end
      #1;
      checks++;
      if (psum_out !== exp_psum) begin
        failures++;
        $display("FAIL: n=%0d psum_out=%0d expected %0d", n, psum_out, exp_psum);
      end
      checks++;
      if (gate_out !== (gate_en ? exp_psum[17 +: 18] : 18'sd0)) begin
        failures++;
        $display("FAIL: n=%0d gate_out=%0d", n, gate_out);
      end
      checks++;
      if (psum_out_n !== exp_psum_n || gate_out_n !== (gate_en ? exp_psum_n[17 +: 18] : 18'sd0)) begin
        failures++;
        $display("FAIL: n=%0d negative gain psum_out=%0d expected %0d", n, psum_out_n, exp_psum_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
