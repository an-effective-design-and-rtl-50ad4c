// tb_diff2se: checks the differential to single-ended amplifier model with
// its default 20 mV hysteresis: a difference above +20 mV gives 1, below
// -20 mV gives 0, and anything in between holds the last output.
module tb_diff2se;
  timeunit 1ps; timeprecision 1fs;

  real vop, von;
  logic ckout;
  int checks = 0, failures = 0;

  diff2se dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input real p, input real n, input bit e);
    vop = p; von = n;
    #100;
    checks++;
    if (ckout !== e) begin
      failures++; $display("FAIL: vop=%f von=%f -> %b exp %b", p, n, ckout, e);
    end
  endtask

  initial begin
    apply(0.95, 0.65, 1);
    apply(0.65, 0.95, 0);
    apply(0.81, 0.80, 0);    // +10 mV: hold 0
    apply(0.83, 0.80, 1);    // +30 mV: switch to 1
    apply(0.80, 0.81, 1);    // -10 mV: hold 1
    apply(0.80, 0.80, 1);    // equal: hold
    apply(0.77, 0.80, 0);    // -30 mV: switch to 0
    for (int k = 0; k < 50; k++) begin
      real d;
      bit e;
      e = ckout;
      d = (real'($urandom_range(200)) - 100.0) / 1000.0;   // -0.1 .. 0.1 V
      if (d > 0.02) e = 1;
      else if (d < -0.02) e = 0;
      apply(0.8 + d / 2.0, 0.8 - d / 2.0, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
