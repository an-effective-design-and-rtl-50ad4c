// tdc_code_sel: TDC code selection.
//
// Picks the sub-TDC that measured the phase error in the right direction:
// when the PFD's LEAD is high (hsync led hsout) the code of sub-TDC #1
// (start = hsync, stop = hsout) is passed on; when LAG is high (hsout led)
// the code of sub-TDC #2 (start = hsout, stop = hsync). With neither (edges
// coincided, or before the first comparison) the code is zero, and if both
// were ever high LEAD wins. Combinational. The selection rule follows the
// document; the zero and priority cases are this design's choice.
module tdc_code_sel #(
  parameter int unsigned CODE_W = 6
) (
  input  logic              lead,           // from the PFD
  input  logic              lag,            // from the PFD
  input  logic [CODE_W-1:0] tdc_code_lead,  // sub-TDC #1
  input  logic [CODE_W-1:0] tdc_code_lag,   // sub-TDC #2
  output logic [CODE_W-1:0] tdc_code
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    if (lead)     tdc_code = tdc_code_lead;
    else if (lag) tdc_code = tdc_code_lag;
    else          tdc_code = '0;
  end
endmodule
