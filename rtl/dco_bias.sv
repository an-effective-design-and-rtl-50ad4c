// dco_bias: behavioural model of the DCO bias generator (DAC and bias).
//
// This is a behavioural model of an analog block, not synthesizable logic.
// A 10-bit DAC turns the code D<9:0> into vdac = VDD * D / 1024; the bias
// section derives the ring's bias voltages from it, VBN = VDD - vdac and
// VBP = vdac, so a larger code gives a weaker bias and a slower ring. The
// outputs follow the code at once (no settling time is modelled). The block
// and its signals (code in, VBP and VBN out) follow the source's DCO; the
// linear voltage law is this model's choice.
module dco_bias #(
  parameter real VDD = 1.2              // supply, V
) (
  input  logic [9:0] dco_code,          // D<9:0> from the DSM
  output real        vbp,               // PMOS bias, V
  output real        vbn                // NMOS bias, V
);
  timeunit 1ps; timeprecision 1fs;

  real vdac;

  always_comb begin
    vdac = VDD * real'(dco_code) / 1024.0;
    vbn  = VDD - vdac;
    vbp  = vdac;
  end
endmodule
