// tdc: time-to-digital converter for both signs of phase error.
//
// Two sub-TDCs run side by side. #1 starts on hsync and stops on hsout, so it
// measures how far hsout lags; #2 starts on hsout and stops on hsync, so it
// measures how far hsout leads. The PFD's LEAD/LAG levels choose which code
// becomes tdc_code. The code of a comparison is valid from its later edge
// until the next comparison's later edge. Structure as in the document (two
// sub-TDCs and a code selection block); the delay-cell value is a parameter.
// The delay lines are behavioural models, so this block simulates but is not
// synthesizable as a whole.
module tdc #(
  parameter int unsigned CODE_W  = 6,
  parameter real         CELL_PS = 30.0
) (
  input  logic              rst_n,
  input  logic              hsync,
  input  logic              hsout,
  input  logic              lead,
  input  logic              lag,
  output logic [CODE_W-1:0] tdc_code_lead,
  output logic [CODE_W-1:0] tdc_code_lag,
  output logic [CODE_W-1:0] tdc_code
);
  timeunit 1ps; timeprecision 1fs;

  sub_tdc #(.CODE_W(CODE_W), .CELL_PS(CELL_PS)) u_sub1 (
    .rst_n(rst_n), .start(hsync), .stop(hsout), .code(tdc_code_lead));

  sub_tdc #(.CODE_W(CODE_W), .CELL_PS(CELL_PS)) u_sub2 (
    .rst_n(rst_n), .start(hsout), .stop(hsync), .code(tdc_code_lag));

  tdc_code_sel #(.CODE_W(CODE_W)) u_sel (
    .lead(lead), .lag(lag),
    .tdc_code_lead(tdc_code_lead), .tdc_code_lag(tdc_code_lag),
    .tdc_code(tdc_code));
endmodule
