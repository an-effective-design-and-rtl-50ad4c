// sub_tdc: behavioural model of one sub-TDC (delay line, sampling flops, T2B).
//
// This is a behavioural model, not synthesizable logic: the delay line is a
// chain of delay cells (in silicon a couple of inverters each, whose delay is
// the TDC resolution) written with SystemVerilog delays. The rising start
// edge runs down the chain; at the rising stop edge a bank of flip-flops
// samples all taps, and the thermometer word is converted to a binary count
// by therm2bin. The code is therefore the start-to-stop time in units of the
// cell delay, saturating at 2^CODE_W - 1. The sampled word stays until the
// next stop edge. Following the document: chain of delay cells, flops, T2B,
// 6-bit code. The cell delay value is this design's choice.
module sub_tdc #(
  parameter int unsigned CODE_W = 6,     // code width (2^CODE_W-1 delay cells)
  parameter real         CELL_PS = 30.0  // delay of one cell in ps
) (
  input  logic              rst_n,       // asynchronous reset of the flops
  input  logic              start,       // edge that enters the delay chain
  input  logic              stop,        // edge that samples the chain
  output logic [CODE_W-1:0] code         // start-to-stop time in cell delays
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned TAPS = (1 << CODE_W) - 1;

  logic [TAPS:0]   tap;     // tap[0] is the start input
  logic [TAPS-1:0] therm;   // sampled taps 1..TAPS

  assign tap[0] = start;
  for (genvar i = 1; i <= TAPS; i++) begin : g_cell
    assign #(CELL_PS) tap[i] = tap[i-1];
  end

  always_ff @(posedge stop or negedge rst_n)
    if (!rst_n) therm <= '0;
    else        therm <= tap[TAPS:1];

  therm2bin #(.OUT_W(CODE_W)) u_t2b (.therm(therm), .bin(code));
endmodule
