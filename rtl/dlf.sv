// dlf: digital loop filter producing the baseline code avg_dco_code.
//
// The filter keeps eight control codes C0..C7. After reset the first eight
// codes it receives fill C0..C7. From then on it collects codes in pairs
// (CN1, CN2). When the second of a pair arrives, it finds the largest and the
// smallest of the ten values C0..C7, CN1, CN2, drops one of each (the first
// occurrence of the minimum, the last occurrence of the maximum, so that two
// different values are dropped even when all ten are equal), stores the
// other eight back into C0..C7 in their original order, and outputs their
// mean (sum / 8, rounded down) as avg_dco_code. Rejecting the extremes keeps
// single codes disturbed by reference-clock jitter out of the baseline.
//
// Interface: one code is accepted on each clock with in_valid high. The
// search, the update of C0..C7 and the new average all happen on the clock
// that accepts CN2; avg_valid rises with the first average and stays high.
// The algorithm (initialise eight, take two, drop max and min, average) is
// the document's; doing it in one clock and the tie rules are this design's.
module dlf
  import dpll_pkg::*;
#(
  parameter int unsigned W     = CODE_W,  // code width
  parameter int unsigned DEPTH = 8        // stored codes C0..C7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] code_in,
  output logic [W-1:0] avg_code,
  output logic         avg_valid
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NV  = DEPTH + 2;
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned SHF = $clog2(DEPTH);
  localparam int unsigned SW  = W + $clog2(NV) + 1;

  logic [W-1:0] c [DEPTH];
  logic [W-1:0] cn1;
  logic         have_cn1;
  logic [CW-1:0] fill;

  // combinational: the ten candidates, the extremes and the kept eight
  logic [W-1:0] v [NV];
  logic [W-1:0] keep [DEPTH];
  int unsigned  imin, imax;
  logic [SW-1:0] keep_sum;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) v[i] = c[i];
    v[DEPTH]   = cn1;
    v[DEPTH+1] = code_in;
    imin = 0;
    imax = 0;
    for (int i = 1; i < NV; i++) begin
      if (v[i] <  v[imin]) imin = i;
      if (v[i] >= v[imax]) imax = i;
    end
    keep_sum = '0;
    for (int i = 0; i < DEPTH; i++) keep[i] = '0;
    begin
      int unsigned k;
      k = 0;
      for (int i = 0; i < NV; i++) begin
        if (i != imin && i != imax && k < DEPTH) begin
          keep[k]  = v[i];
          keep_sum = keep_sum + SW'(v[i]);
          k++;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) c[i] <= '0;
      cn1       <= '0;
      have_cn1  <= 1'b0;
      fill      <= '0;
      avg_code  <= '0;
      avg_valid <= 1'b0;
    end else if (in_valid) begin
      if (fill < CW'(DEPTH)) begin
        c[fill[SHF-1:0]] <= code_in;
        fill    <= fill + CW'(1);
      end else if (!have_cn1) begin
        cn1      <= code_in;
        have_cn1 <= 1'b1;
      end else begin
        for (int i = 0; i < DEPTH; i++) c[i] <= keep[i];
        have_cn1  <= 1'b0;
        avg_code  <= W'(keep_sum >> SHF);
        avg_valid <= 1'b1;
      end
    end
  end

  // the average of the kept eight lies between the dropped extremes
  a_avg_range: assert property (@(posedge clk) disable iff (!rst_n)
                                in_valid && fill == CW'(DEPTH) && have_cn1 |->
                                W'(keep_sum >> SHF) >= v[imin] &&
                                W'(keep_sum >> SHF) <= v[imax]);
endmodule
