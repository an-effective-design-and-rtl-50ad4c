// tb_dco_bias: checks the DCO bias model. For every code D the outputs must
// be VBP = 1.2 V * D / 1024 and VBN = 1.2 V - VBP, VBN must fall and VBP
// rise with the code.
module tb_dco_bias;
  timeunit 1ps; timeprecision 1fs;

  logic [9:0] dco_code;
  real vbp, vbn, vbn_prev;
  int checks = 0, failures = 0;

  dco_bias dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vbn_prev = 2.0;
    for (int d = 0; d < 1024; d++) begin
      real e;
      dco_code = 10'(d);
      #10;
      e = 1.2 * d / 1024.0;
      checks++;
      if (vbp < e - 1.0e-9 || vbp > e + 1.0e-9 || vbn < 1.2 - e - 1.0e-9 ||
          vbn > 1.2 - e + 1.0e-9 || !(vbn < vbn_prev)) begin
        failures++;
        $display("FAIL: D=%0d vbp=%f vbn=%f", d, vbp, vbn);
      end
      vbn_prev = vbn;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
