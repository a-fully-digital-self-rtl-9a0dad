// thermo_to_bin: converts a flash thermometer code to the binary local code
// cd of a stage (the number of comparators that are on), which addresses the
// stage's weight table.
//
// Counting the ones instead of locating the top '1' is this design's choice:
// it gives the same result for a clean thermometer code and degrades
// gracefully on a bubble. Purely combinational.
module thermo_to_bin #(
  parameter int unsigned M   = 2,
  parameter int unsigned CDW = $clog2(M + 1)
) (
  input  logic [M-1:0]   therm,
  output logic [CDW-1:0] code
);

  always_comb begin
    code = '0;
    for (int j = 0; j < M; j++) code = code + CDW'(therm[j]);
  end

endmodule
