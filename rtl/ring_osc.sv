// ring_osc: behavioural model of the four-stage differential ring oscillator.
//
// This is a behavioural model of an analog block, not synthesizable logic.
// Four differential delay stages in a loop oscillate with a period of eight
// stage delays; the stage delay is set by the bias voltages VBN and VBP and
// by the range pin P0. The model recovers the equivalent code
// d = (VBP + VDD - VBN) / (2 VDD) * 1024 from the bias and uses a period
// linear in it: T = T_MIN + d * T_STEP, with one (T_MIN, T_STEP) pair per
// range (P0 = 0 low, P0 = 1 high frequency). VOP and VON are the small-swing
// differential outputs, voltages of VCM +/- SWING/2 that swap every four
// stage delays; a bias change takes effect at the next swap. Four differential stages and the range pin follow the source;
// the period law and its numbers are this model's choice.
module ring_osc #(
  parameter real VDD        = 1.2,     // supply, V
  parameter real T0_MIN_PS  = 3800.0,  // range 0: period at code 0
  parameter real T0_STEP_PS = 10.0,    // range 0: period increase per code
  parameter real T1_MIN_PS  = 1500.0,  // range 1: period at code 0
  parameter real T1_STEP_PS = 4.0,     // range 1: period increase per code
  parameter real VCM        = 0.8,     // output common mode, V
  parameter real SWING      = 0.3      // differential swing, V
) (
  input  real  vbp,                    // PMOS bias, V
  input  real  vbn,                    // NMOS bias, V
  input  logic p0,                     // range select
  output real  vop,                    // differential output, positive, V
  output real  von                     // differential output, negative, V
);
  timeunit 1ps; timeprecision 1fs;

  real  d_eq, t_stage;
  logic phase;                         // which side of the pair is high

  always_comb begin
    d_eq = (vbp + (VDD - vbn)) / (2.0 * VDD) * 1024.0;
    if (p0) t_stage = (T1_MIN_PS + d_eq * T1_STEP_PS) / 8.0;
    else    t_stage = (T0_MIN_PS + d_eq * T0_STEP_PS) / 8.0;
  end

  initial begin
    phase = 1'b0;
    forever begin
      #(4.0 * t_stage);
      phase = ~phase;
    end
  end

  assign vop = phase ? VCM + SWING / 2.0 : VCM - SWING / 2.0;
  assign von = phase ? VCM - SWING / 2.0 : VCM + SWING / 2.0;
endmodule
