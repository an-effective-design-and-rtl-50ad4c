// tb_ring_osc: checks the ring oscillator model. Bias voltages for a set of
// equivalent codes d (VBP = 1.2 d / 1024, VBN = 1.2 - VBP) are applied in
// both ranges; the period of VOP rising above VON, averaged over 16 cycles,
// must be 3800 + 10 d ps (P0 = 0) or 1500 + 4 d ps (P0 = 1), and the two
// outputs must always be VCM +/- 0.15 V and complementary.
module tb_ring_osc;
  timeunit 1ps; timeprecision 1fs;

  real vbp, vbn, vop, von;
  logic p0;
  int checks = 0, failures = 0, bad_levels = 0;

  ring_osc dut (.*);

  logic hi;
  assign hi = vop > von;

  always @(vop or von) begin
    #0;
    if (!((vop > 0.9499 && vop < 0.9501 && von > 0.6499 && von < 0.6501) ||
          (von > 0.9499 && von < 0.9501 && vop > 0.6499 && vop < 0.6501)))
      bad_levels++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ds[] = '{0, 37, 470, 1000, 1023};
    foreach (ds[i]) for (int m = 0; m < 2; m++) begin
      realtime t0;
      real t, e;
      vbp = 1.2 * ds[i] / 1024.0; vbn = 1.2 - vbp; p0 = m[0];
      repeat (2) @(posedge hi);
      t0 = $realtime;
      repeat (16) @(posedge hi);
      t = ($realtime - t0) / 16.0;
      e = m ? 1500.0 + 4.0 * ds[i] : 3800.0 + 10.0 * ds[i];
      checks++;
      if (t < e - 1.0 || t > e + 1.0) begin
        failures++; $display("FAIL: d=%0d p0=%0d period %f exp %f", ds[i], m, t, e);
      end
    end
    checks++;
    if (bad_levels != 0) begin failures++; $display("FAIL: %0d bad output levels", bad_levels); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
