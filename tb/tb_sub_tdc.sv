// tb_sub_tdc: checks one sub-TDC. A start edge is followed by a stop edge
// k cell delays plus half a cell later; the code must be k, saturating at
// 63. The cell delay is 30 ps.
module tb_sub_tdc;
  timeunit 1ps; timeprecision 1fs;

  localparam real CELL = 30.0;
  logic rst_n, start, stop;
  logic [5:0] code;
  int checks = 0, failures = 0;

  sub_tdc #(.CODE_W(6), .CELL_PS(CELL)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int k);
    int exp_k;
    start = 1;
    #(real'(k) * CELL + CELL / 2.0);
    stop = 1;
    #100;
    exp_k = (k > 63) ? 63 : k;
    checks++;
    if (code != 6'(exp_k)) begin
      failures++; $display("FAIL: %0d cells -> code %0d", k, code);
    end
    #5000; start = 0; stop = 0; #5000;
  endtask

  initial begin
    rst_n = 1; #10; rst_n = 0; start = 0; stop = 0;
    #5000; rst_n = 1; #100;
    checks++;
    if (code != 0) begin failures++; $display("FAIL: reset code %0d", code); end
    for (int k = 0; k <= 70; k++) measure(k);
    repeat (30) measure(int'($urandom_range(80)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
