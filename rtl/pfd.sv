// pfd: tri-state phase-frequency detector with direction outputs.
//
// Two flip-flops are set by the rising edges of the reference (hsync) and
// the divided feedback (hsout); when both are set they clear each other
// asynchronously, so UP is high from an hsync edge until the matching hsout
// edge and DN from an hsout edge until the matching hsync edge. The pulse
// width is the time error between the two clocks.
//
// On top of the classic PFD, two direction flops form LEAD and LAG:
//   lead - sampled at each hsout edge: UP was pending, so hsync came first
//          and the DCO must speed up;
//   lag  - sampled at each hsync edge: DN was pending, so hsout came first
//          and the DCO must slow down.
// Both are levels that hold until the next comparison. When the two edges
// coincide both stay low. With no hsout edge for a whole hsync period, lead
// keeps its last value until hsout arrives. The clear path through the
// asynchronous resets of the two flops is the usual PFD reset loop (a
// deliberate combinational path from the flop outputs to their resets).
// Which flop samples which signal is this design's choice; the document
// gives only the behaviour of UP, DN, LEAD and LAG.
module pfd (
  input  logic rst_n,  // asynchronous reset, active low
  input  logic hsync,  // reference clock
  input  logic hsout,  // divided DCO clock
  output logic up,     // hsync leads, pulse width = time error
  output logic dn,     // hsout leads, pulse width = time error
  output logic lead,   // hsync led in the last comparison: speed up
  output logic lag     // hsout led in the last comparison: slow down
);
  timeunit 1ps; timeprecision 1fs;

  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge hsync or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge hsout or posedge clr)
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;

  always_ff @(posedge hsout or negedge rst_n)
    if (!rst_n) lead <= 1'b0;
    else        lead <= up;

  always_ff @(posedge hsync or negedge rst_n)
    if (!rst_n) lag <= 1'b0;
    else        lag <= dn;
endmodule
