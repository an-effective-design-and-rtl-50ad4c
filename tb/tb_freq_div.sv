// tb_freq_div: checks the programmable divider. For several ratios N,
// including the 12-bit maximum and a change of N while running, it counts
// clock cycles between rising edges of hsout (must be N) and the cycles
// hsout stays high (must be floor(N/2)).
module tb_freq_div;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 0, rst_n;
  logic [11:0] n_div;
  logic hsout;
  int checks = 0, failures = 0;
  int cyc = 0;

  freq_div #(.DIV_W(12)) dut (.*);

  always #500 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int n);
    int t_rise, t_fall, t_next;
    @(posedge hsout); t_rise = cyc;
    @(negedge hsout); t_fall = cyc;
    @(posedge hsout); t_next = cyc;
    checks += 2;
    if (t_next - t_rise != n) begin
      failures++; $display("FAIL: N=%0d period %0d", n, t_next - t_rise);
    end
    if (t_fall - t_rise != n / 2) begin
      failures++; $display("FAIL: N=%0d high %0d", n, t_fall - t_rise);
    end
  endtask

  initial begin
    int ns[] = '{2, 3, 7, 100, 801, 1344, 2160, 2592, 4095};
    rst_n = 1; #10; rst_n = 0; n_div = 12'd5;
    #2000; @(negedge clk) rst_n = 1;
    measure(5);
    foreach (ns[i]) begin
      n_div = 12'(ns[i]);
      @(posedge hsout);          // new N loads at this wrap
      measure(ns[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
