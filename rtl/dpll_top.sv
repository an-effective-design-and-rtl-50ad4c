// dpll_top: digital PLL generating a pixel clock from HSYNC.
//
// The loop multiplies the low-frequency, noisy horizontal sync (hsync) by a
// programmable ratio N (800 to over 2600 for common display modes):
//
//   hsync --> pfd --UP/DN, LEAD/LAG--> pll_ctrl --dco_code[18:0]--> dsm
//              |                        ^    ^  \                  |
//              +--> tdc --tdc_code[6:0]-+    |   +--> dlf ---------+ avg_dco_code
//                                            +------------------- (baseline)
//   dsm --D<9:0>--> dco --ckout--> freq_div (/N) --hsout--> pfd, tdc
//
// The PFD compares hsync with the divided clock hsout. The controller,
// clocked by hsync, searches the DCO code by binary search with the
// delta-sigma modulator off, then searches the fractional code with it on,
// and finally tracks phase with the TDC (see pll_ctrl). The loop filter
// averages recent codes with the extremes removed and gives the controller a
// baseline to fall back to at every polarity change. The DSM and the divider
// run on ckout. The 7-bit TDC bus to the controller is the 6-bit selected
// code with the LAG direction as its top bit.
//
// The DCO and the TDC delay lines are behavioural models of analog and
// delay-cell circuits, so this top simulates the whole loop but only the
// digital blocks (pfd, pll_ctrl, dlf, dsm, freq_div, the T2B and the code
// selection) are synthesizable. The block structure and bus widths follow
// the document; the clocking of each block is this design's choice.
module dpll_top
  import dpll_pkg::*;
#(
  parameter real TDC_CELL_PS = 30.0     // sub-TDC delay cell
) (
  input  logic              rst_n,         // asynchronous reset, active low
  input  logic              hsync,         // reference (horizontal sync)
  input  logic [DIV_W-1:0]  n_div,         // feedback ratio N
  input  logic              p0,            // DCO range: 0 low, 1 high
  output logic              ckout,         // pixel clock
  output logic              hsout,         // ckout / N
  output logic              up,            // PFD outputs
  output logic              dn,
  output logic              lead,
  output logic              lag,
  output logic [TDC_W-1:0]  tdc_code_lead, // sub-TDC #1 (hsync first)
  output logic [TDC_W-1:0]  tdc_code_lag,  // sub-TDC #2 (hsout first)
  output logic [TDC_W:0]    tdc_code,      // {lag, selected TDC code}
  output code_t             dco_code,      // controller output
  output code_t             avg_dco_code,  // loop filter baseline
  output logic [INT_W-1:0]  dco_d,         // D<9:0> into the DCO
  output lock_state_e       state,         // lock-in state
  output code_t             step,          // controller search step
  output logic              locked         // phase tracking reached
);
  timeunit 1ps; timeprecision 1fs;

  logic [TDC_W-1:0] tdc_sel;
  logic             code_valid, dsm_en, avg_valid;

  pfd u_pfd (
    .rst_n(rst_n), .hsync(hsync), .hsout(hsout),
    .up(up), .dn(dn), .lead(lead), .lag(lag));

  tdc #(.CODE_W(TDC_W), .CELL_PS(TDC_CELL_PS)) u_tdc (
    .rst_n(rst_n), .hsync(hsync), .hsout(hsout), .lead(lead), .lag(lag),
    .tdc_code_lead(tdc_code_lead), .tdc_code_lag(tdc_code_lag), .tdc_code(tdc_sel));

  assign tdc_code = {lag, tdc_sel};

  pll_ctrl u_ctrl (
    .clk(hsync), .rst_n(rst_n), .lead(lead), .lag(lag), .tdc_code(tdc_code),
    .avg_dco_code(avg_dco_code), .avg_valid(avg_valid),
    .dco_code(dco_code), .code_valid(code_valid), .dsm_en(dsm_en),
    .state(state), .step(step), .locked(locked));

  dlf u_dlf (
    .clk(hsync), .rst_n(rst_n), .in_valid(code_valid), .code_in(dco_code),
    .avg_code(avg_dco_code), .avg_valid(avg_valid));

  dsm u_dsm (
    .clk(ckout), .rst_n(rst_n), .en(dsm_en), .code_in(dco_code),
    .code_out(dco_d));

  dco u_dco (.dco_code(dco_d), .p0(p0), .ckout(ckout));

  freq_div #(.DIV_W(DIV_W)) u_div (
    .clk(ckout), .rst_n(rst_n), .n_div(n_div), .hsout(hsout));
endmodule
