// tb_pfd: checks the phase-frequency detector.
// Drives hsync and hsout with known offsets and checks the UP/DN pulse
// widths (equal to the offset), the LEAD/LAG levels after each comparison,
// coincident edges, and a divided clock running at twice the reference
// (cycle slip) which must read as LAG.
module tb_pfd;
  timeunit 1ps; timeprecision 1fs;

  logic rst_n, hsync, hsout, up, dn, lead, lag;
  int checks = 0, failures = 0;
  realtime t_up_rise, t_dn_rise, up_w, dn_w;

  pfd dut (.*);

  always @(posedge up) t_up_rise = $realtime;
  always @(negedge up) up_w = $realtime - t_up_rise;
  always @(posedge dn) t_dn_rise = $realtime;
  always @(negedge dn) dn_w = $realtime - t_dn_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one comparison: hsync rises at t0, hsout at t0+off (off may be < 0)
  task automatic compare(input int off_ps);
    up_w = -1; dn_w = -1;
    if (off_ps >= 0) begin
      hsync = 1; #(off_ps); hsout = 1;
    end else begin
      hsout = 1; #(-off_ps); hsync = 1;
    end
    #1000; hsync = 0; hsout = 0; #50000;
    if (off_ps > 0) begin
      check(up_w == real'(off_ps), $sformatf("UP width %0t for offset %0d", up_w, off_ps));
      check(lead && !lag, $sformatf("LEAD expected for offset %0d", off_ps));
    end else if (off_ps < 0) begin
      check(dn_w == real'(-off_ps), $sformatf("DN width %0t for offset %0d", dn_w, off_ps));
      check(lag && !lead, $sformatf("LAG expected for offset %0d", off_ps));
    end else begin
      check(!lead && !lag, "no direction for coincident edges");
    end
    check(!up && !dn, "UP/DN cleared after comparison");
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #10; rst_n = 0; hsync = 0; hsout = 0;
    #1000; rst_n = 1; #1000;
    check(!up && !dn && !lead && !lag, "reset state");
    compare(2500);
    compare(-1700);
    compare(40);
    compare(-30);
    compare(0);
    for (int i = 0; i < 20; i++) begin
      int off;
      off = int'($urandom_range(20000)) - 10000;
      compare(off);
    end
    // hsout twice as fast as hsync: hsout edges at 0.3, 0.8 of the period
    for (int k = 0; k < 4; k++) begin
      #30000; hsout = 1; #1000; hsout = 0;
      #49000; hsout = 1; #1000; hsout = 0;
      #19000; hsync = 1; #1000; hsync = 0;
      check(lag && !lead, "LAG with a fast divided clock");
    end
    // hsout absent: UP stays high across hsync edges
    repeat (3) begin #100000; hsync = 1; #1000; hsync = 0; end
    check(up && !dn && !lag, "UP pending with no divided clock");
    #1000; hsout = 1; #1000; hsout = 0; #1000;
    check(lead && !up, "LEAD once the divided clock arrives late");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
