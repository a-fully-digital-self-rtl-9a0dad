// tb_thermo_to_bin: exhaustive test of the thermometer-to-binary converter for
// M = 2 (the default stage) and M = 4 (a 2-bit stage). Every input pattern is
// applied; the expected code is the number of ones, computed here with
// $countones. Clean thermometer codes are also checked against their level.
module tb_thermo_to_bin;

  int checks = 0, failures = 0;

  logic [1:0] t2;  logic [1:0] c2;
  logic [3:0] t4;  logic [2:0] c4;

  thermo_to_bin #(.M(2)) dut2 (.therm(t2), .code(c2));
  thermo_to_bin #(.M(4)) dut4 (.therm(t4), .code(c4));

  initial begin
    for (int p = 0; p < 4; p++) begin
      t2 = 2'(p);
      #1;
      checks++;
      if (32'(c2) != $countones(t2)) begin
        failures++;
        $display("FAIL: M=2 therm=%b code=%0d", t2, c2);
      end
    end
    for (int p = 0; p < 16; p++) begin
      t4 = 4'(p);
      #1;
      checks++;
      if (32'(c4) != $countones(t4)) begin
        failures++;
        $display("FAIL: M=4 therm=%b code=%0d", t4, c4);
      end
    end
    // clean thermometer codes: level k has the k lowest comparators on
    for (int k = 0; k <= 4; k++) begin
      t4 = 4'((1 << k) - 1);
      #1;
      checks++;
      if (32'(c4) != k) begin
        failures++;
        $display("FAIL: level %0d gave %0d", k, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
