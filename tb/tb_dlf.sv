// tb_dlf: checks the digital loop filter against a reference kept in the
// testbench as an unordered set of eight codes: after the first eight codes
// fill it, each pair of new codes is merged, the ten values are sorted, the
// smallest and the largest are dropped, and the expected output is the sum
// of the remaining eight divided by eight. avg_valid must rise with the
// first pair and the average must appear on the clock that accepts the
// second code of each pair.
module tb_dlf;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic clk = 0, rst_n, in_valid;
  code_t code_in, avg_code;
  logic avg_valid;
  int checks = 0, failures = 0;
  longint ref_set[$];
  longint cn1;

  dlf dut (.*);

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

  task automatic push(input code_t c);
    @(negedge clk); in_valid = 1; code_in = c;
    @(negedge clk); in_valid = 0;
  endtask

  function automatic longint ref_update(input longint a, input longint b);
    longint all[$], s;
    all = ref_set;
    all.push_back(a); all.push_back(b);
    all.sort();
    void'(all.pop_front());
    void'(all.pop_back());
    ref_set = all;
    s = 0;
    foreach (all[i]) s += all[i];
    return s / 8;
  endfunction

  task automatic run_sequence(input int n_pairs, input int spread);
    longint e;
    code_t a, b;
    for (int p = 0; p < n_pairs; p++) begin
      a = code_t'(200000 + int'($urandom_range(spread)));
      b = code_t'(200000 + int'($urandom_range(spread)));
      if (p % 5 == 3) b = code_t'($urandom);       // an outlier
      push(a);
      check(avg_valid || p == 0, "avg_valid stays high");
      push(b);
      e = ref_update(a, b);
      check(avg_valid && avg_code == code_t'(e),
            $sformatf("pair %0d: avg %0d exp %0d", p, avg_code, e));
    end
  endtask

  initial begin
    rst_n = 1; #10; rst_n = 0; in_valid = 0; code_in = '0;
    #2000; @(negedge clk) rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      code_t c;
      c = code_t'(200000 + i * 37);
      push(c);
      ref_set.push_back(longint'(c));
      check(!avg_valid, "no average during initialisation");
    end
    run_sequence(40, 5000);
    // all ten equal: average equals the value
    rst_n = 0; ref_set.delete(); #1000; rst_n = 1;
    repeat (10) push(code_t'(12345));
    check(avg_code == code_t'(12345), $sformatf("equal codes: %0d", avg_code));
    // extreme values
    rst_n = 0; ref_set.delete(); #1000; rst_n = 1;
    for (int i = 0; i < 8; i++) begin push('1); ref_set.push_back(longint'(code_t'('1))); end
    begin
      longint e;
      push('1); push('0);
      e = ref_update(longint'(code_t'('1)), 0);
      check(avg_code == code_t'(e), $sformatf("top codes: %0d exp %0d", avg_code, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
