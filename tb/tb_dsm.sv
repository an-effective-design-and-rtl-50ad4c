// tb_dsm: checks the first-order delta-sigma modulator. With the modulator
// off the output must equal the integral part. With it on, over any 512
// consecutive clocks the output must be k+1 exactly f times and k otherwise,
// for a word with integral part k and fraction f. The latency from a new
// word to the output is checked to be four clocks.
module tb_dsm;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk = 0, rst_n, en;
  code_t code_in;
  logic [9:0] code_out;
  int checks = 0, failures = 0;

  dsm dut (.*);

  always #500 clk = ~clk;

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

  task automatic run_word(input int k, input int f, input bit on);
    int hi, lo, other;
    @(negedge clk); en = on; code_in = code_t'((k << 9) | f);
    repeat (10) @(negedge clk);
    hi = 0; lo = 0; other = 0;
    repeat (512) begin
      @(negedge clk);
      if (code_out == 10'(k + 1)) hi++;
      else if (code_out == 10'(k)) lo++;
      else other++;
    end
    if (on && k < 1023)
      check(hi == f && other == 0, $sformatf("k=%0d f=%0d: %0d high, %0d other", k, f, hi, other));
    else
      check(lo == 512, $sformatf("k=%0d f=%0d off/top: %0d at k", k, f, lo));
  endtask

  initial begin
    rst_n = 1; #10; rst_n = 0; en = 0; code_in = '0;
    #2000; @(negedge clk) rst_n = 1;
    // latency: a new integral part appears after four clocks
    @(negedge clk); code_in = code_t'(300 << 9);
    repeat (3) @(negedge clk);
    check(code_out != 10'd300, "output not before fourth clock");
    @(negedge clk);
    check(code_out == 10'd300, $sformatf("latency 4: got %0d", code_out));
    run_word(300, 0, 1);
    run_word(300, 1, 1);
    run_word(512, 256, 1);
    run_word(17, 511, 1);
    run_word(700, 100, 0);
    run_word(1023, 200, 1);
    for (int i = 0; i < 6; i++) run_word(int'($urandom_range(1022)), int'($urandom_range(511)), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
