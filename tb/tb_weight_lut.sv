// tb_weight_lut: checks the weight table of stage 5 (default sizes: 3 entries
// of 18 bits, 16 fractional bits, 6-bit write address {stage, entry}).
//  * after reset the entries hold the nominal levels -0.25, 0.25, 0.75
//    (-16384, 16384, 49152 weight LSBs);
//  * writes to this stage's entries land, one cycle later;
//  * writes addressed to other stages or to the unused entry 3 change nothing;
//  * load_nominal restores the nominal levels;
//  * the read-back port returns an entry of this stage when enabled and
//    addressed, zero otherwise.
// A reference copy of the table is kept in the testbench. A second table with
// negative gain (NEG_GAIN) takes the same inputs; its nominal levels are
// 0.25, 0.75 and 1.25 (16384, 49152, 81920).
module tb_weight_lut;

  localparam int unsigned STAGE = 5;

  logic clk = 1'b0, rst_n = 1'b0, load_nominal = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [1:0] code;
  logic signed [17:0] weight, wr_data, rd_data;
  logic [5:0] wr_addr, rd_addr;
  int checks = 0, failures = 0;
  logic signed [17:0] ref_t [3], ref_n [3];
  logic signed [17:0] weight_n, rd_data_n;

  always #5 clk = ~clk;

  weight_lut #(.STAGE(STAGE)) dut (
    .clk, .rst_n, .load_nominal, .code, .weight, .wr_en, .wr_addr, .wr_data,
    .rd_en, .rd_addr, .rd_data
  );

  weight_lut #(.STAGE(STAGE), .NEG_GAIN(1'b1)) dut_n (
    .clk, .rst_n, .load_nominal, .code, .weight(weight_n), .wr_en, .wr_addr, .wr_data,
    .rd_en, .rd_addr, .rd_data(rd_data_n)
  );

  task automatic check_all(input string tag);
    for (int i = 0; i < 3; i++) begin
      code = 2'(i);
      #1;
      checks++;
      if (weight !== ref_t[i]) begin
        failures++;
        $display("FAIL %s: W[%0d]=%0d expected %0d", tag, i, weight, ref_t[i]);
      end
      checks++;
      if (weight_n !== ref_n[i]) begin
        failures++;
        $display("FAIL %s: negative gain W[%0d]=%0d expected %0d", tag, i, weight_n, ref_n[i]);
      end
    end
    // read-back port: own entries when enabled, zero otherwise
    for (int r = 0; r < 6; r++) begin
      int st, en;
      st = (r < 4) ? STAGE : int'($urandom() % 16);
      en = (r < 3) ? r : int'($urandom() % 4);
      rd_en = (r != 5);
      rd_addr = {4'(st), 2'(en)};
      #1;
      checks++;
      if (rd_data !== ((rd_en && st == STAGE && en < 3) ? ref_t[en] : 18'sd0)) begin
        failures++;
        $display("FAIL %s: read-back of %0d/%0d gave %0d", tag, st, en, rd_data);
      end
    end
    rd_en = 1'b0;
  endtask

  task automatic write(input int stage, input int entry, input logic signed [17:0] d);
    @(negedge clk);
    wr_en = 1'b1;
    wr_addr = {4'(stage), 2'(entry)};
    wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    if (stage == STAGE && entry < 3) begin
      ref_t[entry] = d;
      ref_n[entry] = d;
    end
  endtask

  initial begin
    ref_t[0] = -18'sd16384; ref_t[1] = 18'sd16384; ref_t[2] = 18'sd49152;
    ref_n[0] = 18'sd16384;  ref_n[1] = 18'sd49152; ref_n[2] = 18'sd81920;
    code = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    #12 rst_n = 1'b1;
    check_all("reset");
    for (int r = 0; r < 40; r++) begin
      int st, en;
      st = (r % 3 == 0) ? int'($urandom() % 16) : STAGE;
      en = int'($urandom() % 4);
      write(st, en, 18'($urandom()));
      check_all($sformatf("write %0d", r));
    end
    @(negedge clk);
    load_nominal = 1'b1;
    @(negedge clk);
    load_nominal = 1'b0;
    ref_t[0] = -18'sd16384; ref_t[1] = 18'sd16384; ref_t[2] = 18'sd49152;
    ref_n[0] = 18'sd16384;  ref_n[1] = 18'sd49152; ref_n[2] = 18'sd81920;
    check_all("load_nominal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
