// dco: behavioural model of the digitally controlled oscillator.
//
// This is a behavioural model of an analog block, not synthesizable logic.
// It chains the three stages of the real DCO:
//   dco_bias - a DAC turns the 10-bit code D<9:0> into a control voltage,
//              from which the bias section derives VBN and VBP;
//   ring_osc - four differential delay stages whose delay is set by the
//              bias and by the range pin P0, giving the pair VOP/VON;
//   diff2se  - an amplifier that turns VOP/VON into the rail-to-rail CKOUT.
// A higher code gives a lower bias and a slower ring: the period grows
// linearly with the code, T = T_MIN + D * T_STEP, where P0 picks one of two
// ranges (P0 = 0 low-frequency, P0 = 1 high-frequency). With the default
// values range 0 spans about 263 MHz down to 71 MHz and range 1 about
// 667 MHz down to 179 MHz, together covering a 76-650 MHz output range. A
// new code takes effect at the next half period. The stages, the mode pin
// and the direction (larger code, lower frequency) follow the source; the
// linear period law and all numeric values are this model's choice.
module dco #(
  parameter real VDD        = 1.2,     // supply, V
  parameter real T0_MIN_PS  = 3800.0,  // range 0: period at code 0
  parameter real T0_STEP_PS = 10.0,    // range 0: period increase per code
  parameter real T1_MIN_PS  = 1500.0,  // range 1: period at code 0
  parameter real T1_STEP_PS = 4.0      // range 1: period increase per code
) (
  input  logic [9:0] dco_code,  // D<9:0> from the DSM
  input  logic       p0,        // range select: 0 low, 1 high frequency
  output logic       ckout      // oscillator output
);
  timeunit 1ps; timeprecision 1fs;

  real  vbp, vbn;    // bias voltages of the ring
  real  vop, von;    // ring oscillator differential output

  dco_bias #(.VDD(VDD)) u_bias (.dco_code(dco_code), .vbp(vbp), .vbn(vbn));

  ring_osc #(
    .VDD(VDD), .T0_MIN_PS(T0_MIN_PS), .T0_STEP_PS(T0_STEP_PS),
    .T1_MIN_PS(T1_MIN_PS), .T1_STEP_PS(T1_STEP_PS)
  ) u_ring (.vbp(vbp), .vbn(vbn), .p0(p0), .vop(vop), .von(von));

  diff2se u_se (.vop(vop), .von(von), .ckout(ckout));
endmodule
