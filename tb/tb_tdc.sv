// tb_tdc: checks the two-sided TDC. For hsync leading hsout by a time t the
// testbench raises LEAD, for hsout leading it raises LAG, and the selected
// code must be floor(t / 30 ps) capped at 63, from the matching sub-TDC.
module tb_tdc;
  timeunit 1ps; timeprecision 1fs;

  logic rst_n, hsync, hsout, lead, lag;
  logic [5:0] tdc_code_lead, tdc_code_lag, tdc_code;
  int checks = 0, failures = 0;

  tdc #(.CODE_W(6), .CELL_PS(30.0)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cells, input bit hsync_first);
    int exp_k;
    real t;
    t = real'(cells) * 30.0 + 15.0;
    if (hsync_first) begin hsync = 1; #(t); hsout = 1; end
    else             begin hsout = 1; #(t); hsync = 1; end
    #10;
    lead = hsync_first; lag = !hsync_first;
    #100;
    exp_k = (cells > 63) ? 63 : cells;
    checks++;
    if (tdc_code != 6'(exp_k)) begin
      failures++;
      $display("FAIL at %0t: lead=%0d lag=%0d %0d cells", $realtime, tdc_code_lead, tdc_code_lag, cells);
      $display("FAIL: %0d cells, hsync_first=%b -> %0d", cells, hsync_first, tdc_code);
    end
    #5000; hsync = 0; hsout = 0; #5000;
  endtask

  initial begin
    rst_n = 1; #10; rst_n = 0; hsync = 0; hsout = 0; lead = 0; lag = 0;
    #5000; rst_n = 1; #100;
    for (int k = 0; k < 40; k++)
      run(int'($urandom_range(70)), k[0]);
    run(3, 1); run(50, 0); run(63, 1); run(64, 0);
    lead = 0; lag = 0; #10;
    checks++;
    if (tdc_code != 0) begin failures++; $display("FAIL: no direction -> %0d", tdc_code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
