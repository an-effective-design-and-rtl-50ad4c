// tb_dco: checks the DCO model. For a set of codes in both ranges it
// measures the ckout period over 16 cycles and compares it with the
// model's law T = T_MIN + D * T_STEP (mode 0: 3800 ps + 10 ps/code,
// mode 1: 1500 ps + 4 ps/code). It also checks that a larger code gives a
// lower frequency and that the range ends cover 76 MHz and 650 MHz.
module tb_dco;
  timeunit 1ps; timeprecision 1fs;

  logic [9:0] dco_code;
  logic p0, ckout;
  int checks = 0, failures = 0;

  dco dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic period(input int code, input bit mode, output real t);
    realtime t0;
    dco_code = 10'(code); p0 = mode;
    repeat (3) @(posedge ckout);
    t0 = $realtime;
    repeat (16) @(posedge ckout);
    t = ($realtime - t0) / 16.0;
  endtask

  initial begin
    int codes[] = '{0, 1, 100, 470, 512, 900, 1023};
    real t, t_exp, t_prev;
    foreach (codes[i]) for (int m = 0; m < 2; m++) begin
      period(codes[i], m[0], t);
      t_exp = m ? 1500.0 + 4.0 * codes[i] : 3800.0 + 10.0 * codes[i];
      check(t > t_exp - 1.0 && t < t_exp + 1.0,
            $sformatf("code %0d mode %0d: %f ps exp %f", codes[i], m, t, t_exp));
    end
    period(1023, 0, t);  check(1.0e6 / t < 76.0, "mode 0 reaches below 76 MHz");
    period(0, 1, t);     check(1.0e6 / t > 650.0, "mode 1 reaches above 650 MHz");
    t_prev = 0.0;
    for (int c = 0; c < 1024; c += 64) begin
      period(c, 0, t);
      check(t > t_prev, $sformatf("period grows with code at %0d", c));
      t_prev = t;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
