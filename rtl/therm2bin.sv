// therm2bin: thermometer-to-binary converter (T2B) of a sub-TDC.
//
// The delay line of a sub-TDC leaves a thermometer pattern in its sampling
// flops: as many ones as delay cells the start edge passed before the stop
// edge. The binary result is the number of ones in the word. Counting ones
// rather than locating the first zero keeps the result within one count of
// the right value when a single bubble (a lone zero inside the ones) is
// sampled. Purely combinational. The document names the T2B; the converter
// style is this design's choice.
module therm2bin #(
  parameter int unsigned OUT_W = 6               // binary width
) (
  input  logic [(1<<OUT_W)-2:0] therm,           // 2^OUT_W - 1 thermometer bits
  output logic [OUT_W-1:0]      bin              // number of ones
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    bin = '0;
    for (int i = 0; i < (1<<OUT_W)-1; i++)
      bin = bin + OUT_W'(therm[i]);
  end
endmodule
