// diff2se: behavioural model of the differential to single-ended amplifier.
//
// This is a behavioural model of an analog block, not synthesizable logic.
// It turns the ring oscillator's small-swing differential pair into a
// rail-to-rail clock: the output goes high once VOP exceeds VON by more than
// the hysteresis VHYS, low once VON exceeds VOP by more than VHYS, and holds
// its value in between, so a pair with too little swing produces no clock.
// The output changes TPD_PS after the input crossing. Holding the value
// between the thresholds makes `state` a latch on purpose: hysteresis needs
// memory, and the model has no clock to build it from. The block follows the
// source's DCO; the hysteresis and the delay are this model's choices.
module diff2se #(
  parameter real VHYS   = 0.02,        // input hysteresis, V
  parameter real TPD_PS = 0.0          // propagation delay, ps
) (
  input  real  vop,                    // differential input, positive, V
  input  real  von,                    // differential input, negative, V
  output logic ckout                   // single-ended output
);
  timeunit 1ps; timeprecision 1fs;

  logic state;

  initial state = 1'b0;

  always @(vop or von) begin
    if (vop - von > VHYS)       state = 1'b1;
    else if (von - vop > VHYS)  state = 1'b0;
  end

  assign #(TPD_PS) ckout = state;
endmodule
