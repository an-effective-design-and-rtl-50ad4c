// tb_dpll_modes: the DPLL locking to the line rates of several display
// modes, with a noisy reference.
//
// For each mode the whole loop is reset and must lock to the mode's line
// rate and total pixels per line (VESA timing values): XGA at 75 Hz,
// SXGA, UXGA and WUXGA at 60 Hz in the low DCO range, and WUXGA at 85 Hz in
// the high range. Every hsync edge is moved by a random amount of up to
// +/-500 ps to stand in for reference noise; XGA is run once more with
// +/-3 ns. Checks per mode: lock reached,
// 40 +/- 1 hsout edges in 40 hsync periods, mean ckout frequency within
// 0.1 % of N times the line rate, and hsout within 3 ns of hsync (1 ns plus
// four times the jitter). The lock
// time of each mode is printed.
module tb_dpll_modes;
  timeunit 1ps; timeprecision 1fs;
  import dpll_pkg::*;

  logic rst_n, hsync, p0;
  logic [11:0] n_div;
  logic ckout, hsout, up, dn, lead, lag, locked;
  logic [6:0] tdc_code;
  logic [5:0] tdc_code_lead, tdc_code_lag;
  code_t step;
  code_t dco_code, avg_dco_code;
  logic [9:0] dco_d;
  lock_state_e state;

  int checks = 0, failures = 0;
  realtime th_ps;          // hsync period
  real jitter_ps;
  bit run_ref;

  dpll_top dut (.*);

  // ---- reference generator ----
  initial begin
    realtime j_prev, j;
    hsync = 0;
    j_prev = 0.0;
    forever begin
      wait (run_ref);
      j = (jitter_ps > 0.0) ? (real'($urandom_range(2000)) / 1000.0 - 1.0) * jitter_ps : 0.0;
      #(0.9 * th_ps + j - j_prev);
      hsync = 1;
      #(0.1 * th_ps);
      hsync = 0;
      j_prev = j;
    end
  end

  // ---- mechanism counters ----
  int n_lead, n_lag, n_flip, n_restore, n_coarse, n_fine, n_frac, n_track;
  int n_dither, n_avg, n_tdc_corr;
  always @(posedge hsync) if (rst_n) begin
    if (dut.u_ctrl.dir_dn) n_lead++;
    if (dut.u_ctrl.dir_up) n_lag++;
    if (dut.u_ctrl.flip && !locked) n_flip++;
    if (dut.u_ctrl.flip && !locked && avg_valid_q) n_restore++;
    case (state)
      ST_COARSE: n_coarse++;
      ST_FINE:   n_fine++;
      ST_FRAC:   n_frac++;
      ST_TRACK:  n_track++;
      default: ;
    endcase
    if (locked && tdc_code[5:0] != 0) n_tdc_corr++;
  end
  logic avg_valid_q;
  assign avg_valid_q = dut.avg_valid;
  always @(posedge dut.avg_valid or posedge dut.u_dlf.avg_code[0] or negedge dut.u_dlf.avg_code[0]) n_avg++;
  logic [9:0] d_prev;
  always @(posedge ckout) begin
    if (dut.u_dsm.en_cur && dco_d != d_prev) n_dither++;
    d_prev <= dco_d;
  end

  initial begin
    #(2.0e12);   // 2 s of simulated time
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
    else $display("ok: %s", what);
  endtask

  // one display mode: N total pixels per line, line rate in Hz
  task automatic run_mode(input string name, input int n, input real fh, input bit mode,
                          input real jit);
    realtime t0, t_lock, t_hs, t_ho, max_err;
    int ck_cnt, hs_cnt, bad_cnt, cyc;
    real f_ck, f_exp;
    run_ref = 0;
    rst_n = 0;
    n_div = 12'(n); p0 = mode; jitter_ps = jit;
    th_ps = 1.0e12 / fh;
    #10000; rst_n = 1;
    t0 = $realtime;
    run_ref = 1;
    cyc = 0;
    while (!locked && cyc < 800) begin @(posedge hsync); cyc++; end
    t_lock = $realtime - t0;
    check(locked, $sformatf("%s: locked after %0d hsync periods (%.1f us)", name, cyc, t_lock / 1.0e6));
    if (!locked) begin
      failures += 3;
      $display("FAIL: %s: no lock, frequency and phase not measured", name);
      return;
    end
    repeat (60) @(posedge hsync);
    // measure
    ck_cnt = 0; hs_cnt = 0; bad_cnt = 0; max_err = 0;
    fork
      begin : count_ck
        forever begin @(posedge ckout); ck_cnt++; end
      end
      begin : count_hs
        forever begin
          @(posedge hsout); hs_cnt++; t_ho = $realtime;
          if (t_ho - t_hs > max_err && t_ho - t_hs < th_ps / 2) max_err = t_ho - t_hs;
        end
      end
      begin : ref_side
        int last_hs, last_hs0;
        @(posedge hsync); t_hs = $realtime; last_hs = hs_cnt; last_hs0 = hs_cnt;
        ck_cnt = 0;
        t0 = $realtime;
        repeat (40) begin
          @(posedge hsync);
          if (t_hs - t_ho < th_ps / 2 && t_hs - t_ho > max_err) max_err = t_hs - t_ho;
          last_hs = hs_cnt;
          t_hs = $realtime;
        end
        f_ck = real'(ck_cnt) / (($realtime - t0) * 1.0e-12);
        bad_cnt = hs_cnt - last_hs0 - 40;
      end
    join_any
    disable fork;
    f_exp = real'(n) * fh;
    check(bad_cnt >= -1 && bad_cnt <= 1,
          $sformatf("%s: 40 +/- 1 hsout edges in 40 hsync periods (%0d extra)", name, bad_cnt));
    check(f_ck > f_exp * 0.999 && f_ck < f_exp * 1.001,
          $sformatf("%s: ckout %.3f MHz, expected %.3f MHz", name, f_ck / 1.0e6, f_exp / 1.0e6));
    check(max_err < 1000.0 + 4.0 * jit, $sformatf("%s: phase error %.0f ps", name, max_err));
  endtask

  initial begin
    rst_n = 1; p0 = 0; n_div = 12'd1000; th_ps = 10.0e6; jitter_ps = 0; run_ref = 0;
    #10;
    run_mode("XGA@75",   1312,  60023.0, 1'b0, 500.0);
    run_mode("SXGA@60",  1688,  63981.0, 1'b0, 500.0);
    run_mode("UXGA@60",  2160,  75000.0, 1'b0, 500.0);
    run_mode("WUXGA@60", 2592,  74556.0, 1'b0, 500.0);
    run_mode("WUXGA@85", 2624, 107184.0, 1'b1, 500.0);
    run_mode("XGA@75, +/-3 ns jitter", 1312, 60023.0, 1'b0, 3000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
