// tb_tdc_code_sel: checks the TDC code selection for every LEAD/LAG
// combination with random sub-TDC codes.
module tb_tdc_code_sel;
  timeunit 1ps; timeprecision 1fs;

  logic lead, lag;
  logic [5:0] tdc_code_lead, tdc_code_lag, tdc_code, exp_code;
  int checks = 0, failures = 0;

  tdc_code_sel dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      lead = k[0]; lag = k[1];
      tdc_code_lead = 6'($urandom); tdc_code_lag = 6'($urandom);
      #10;
      exp_code = lead ? tdc_code_lead : (lag ? tdc_code_lag : 6'd0);
      checks++;
      if (tdc_code != exp_code) begin
        failures++;
        $display("FAIL: lead=%b lag=%b got %0d exp %0d", lead, lag, tdc_code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
