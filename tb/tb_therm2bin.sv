// tb_therm2bin: checks the thermometer-to-binary converter with every clean
// thermometer word (0..63 ones) and with random words, whose expected
// result is counted bit by bit in the testbench.
module tb_therm2bin;
  timeunit 1ps; timeprecision 1fs;

  logic [62:0] therm;
  logic [5:0]  bin;
  int checks = 0, failures = 0;

  therm2bin #(.OUT_W(6)) dut (.therm(therm), .bin(bin));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 63; n++) begin
      therm = (n == 63) ? '1 : ((63'(1) << n) - 63'(1));
      #10;
      checks++;
      if (bin != 6'(n)) begin failures++; $display("FAIL: %0d ones -> %0d", n, bin); end
    end
    for (int k = 0; k < 200; k++) begin
      int exp_n;
      therm = {$urandom, $urandom};
      exp_n = 0;
      for (int i = 0; i < 63; i++) if (therm[i]) exp_n++;
      #10;
      checks++;
      if (bin != 6'(exp_n)) begin failures++; $display("FAIL: %h -> %0d exp %0d", therm, bin, exp_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
