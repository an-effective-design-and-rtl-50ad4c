// tb_pll_ctrl: checks the lock-in controller.
// Part 1 drives LEAD/LAG by hand and checks the first binary-search moves:
// reset code 512.0, a step of 256 integral codes, halving of the step on a
// polarity change, restore of avg_dco_code on a polarity change once the
// filter is valid, and saturation at the top of the code range.
// Part 2 closes a loop around an ideal plant that reports LEAD whenever the
// code is above a hidden target (DCO too slow) and LAG when below; the controller must
// pass COARSE, FINE and FRAC in order, with the DSM off then on, reach TRACK
// and end within a few fractional LSBs of the target.
// Part 3 checks the tracking law with the default gains:
// code = base +/- 1 +/- (TDC code >> 2).
module tb_pll_ctrl;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk = 0, rst_n, lead, lag, avg_valid;
  logic [6:0] tdc_code;
  code_t avg_dco_code, dco_code, step;
  logic code_valid, dsm_en, locked;
  lock_state_e state;
  int checks = 0, failures = 0;

  pll_ctrl dut (.*);

  always #500 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(input bit l_ead, input bit l_ag);
    @(negedge clk); lead = l_ead; lag = l_ag;
    @(negedge clk);
  endtask

  localparam int U = 512;   // one integral step in code LSBs

  initial begin
    int target, seen_fine, seen_frac, order_ok, cyc;
    code_t c0;
    rst_n = 1; #10; rst_n = 0; lead = 0; lag = 0; avg_valid = 0; avg_dco_code = '0; tdc_code = '0;
    #2000; @(negedge clk) rst_n = 1;
    check(dco_code == code_t'(512 * U) && state == ST_COARSE && !dsm_en &&
          step == code_t'(256 * U), "reset values");
    @(negedge clk); lag = 1;              // decision on the next edge
    @(posedge clk); #1;
    check(dco_code == code_t'(768 * U), $sformatf("lag -> +256: %0d", dco_code / U));
    @(negedge clk); lag = 0; lead = 1;
    @(posedge clk); #1;
    check(dco_code == code_t'(768 * U) && step == code_t'(128 * U), "flip halves step, holds code");
    @(posedge clk); #1;
    check(dco_code == code_t'(640 * U), $sformatf("lead -> -128: %0d", dco_code / U));
    @(negedge clk); lead = 0; lag = 1; avg_valid = 1; avg_dco_code = code_t'(600 * U + 77);
    @(posedge clk); #1;
    check(dco_code == code_t'(600 * U + 77) && step == code_t'(64 * U), "flip restores avg_dco_code");
    @(negedge clk); lead = 0; lag = 0;
    @(posedge clk); #1;
    check(dco_code == code_t'(600 * U + 77), "no direction holds the code");
    // saturation
    @(negedge clk); lag = 1;
    repeat (10) @(posedge clk);
    #1;
    check(dco_code == '1, $sformatf("saturates at top: %h", dco_code));
    @(negedge clk); lag = 0;

    // part 2: closed loop around an ideal plant
    avg_valid = 0;
    target = 300 * U + 211;
    rst_n = 0; #1000; @(negedge clk) rst_n = 1;
    seen_fine = 0; seen_frac = 0; order_ok = 1; cyc = 0;
    while (state != ST_TRACK && cyc < 500) begin
      @(negedge clk);
      lead = int'(dco_code) >= target;
      lag  = int'(dco_code) < target;
      if (state == ST_FINE) begin
        seen_fine = 1;
        if (seen_frac || dsm_en) order_ok = 0;
      end
      if (state == ST_FRAC) begin
        seen_frac = 1;
        if (!seen_fine || !dsm_en) order_ok = 0;
      end
      if (state == ST_COARSE && (seen_fine || dsm_en)) order_ok = 0;
      cyc++;
    end
    check(state == ST_TRACK && locked && dsm_en, $sformatf("reached TRACK after %0d cycles", cyc));
    check(seen_fine && seen_frac && order_ok, "states COARSE, FINE, FRAC in order");
    check(int'(dco_code) - target <= 4 && target - int'(dco_code) <= 4,
          $sformatf("final code %0d target %0d", dco_code, target));

    // part 3: tracking law, KI = 1, correction = tdc / 4
    @(negedge clk); lead = 0; lag = 1; tdc_code = {1'b1, 6'd0};
    @(posedge clk); #1; c0 = dco_code;     // base + 1
    @(negedge clk); tdc_code = {1'b1, 6'd41};
    @(posedge clk); #1;
    check(dco_code == c0 + 1 + 10, $sformatf("lag 41: %0d vs %0d", dco_code, c0));
    @(negedge clk); lag = 0; lead = 1; tdc_code = {1'b0, 6'd23};
    @(posedge clk); #1;
    check(dco_code == c0 - 5, $sformatf("lead 23: %0d vs %0d", dco_code, c0));
    @(negedge clk); lag = 0; lead = 0; tdc_code = '0;
    @(posedge clk); #1;
    check(dco_code == c0 && state == ST_TRACK, "no direction: base only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
