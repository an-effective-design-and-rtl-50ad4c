// freq_div: 12-bit programmable frequency divider (divide by N).
//
// Counts DCO clock cycles from 0 to N-1 and produces hsout with one rising
// edge every N cycles: hsout goes high on the cycle the counter wraps and low
// again floor(N/2) cycles later. The ratio input is taken when the counter
// wraps, so a new N takes effect at the start of the next output period and
// never produces a short pulse. Ratios below 2 are treated as 2. hsout is a
// registered output. The 12-bit programmable ratio is from the document; the
// duty cycle, the load point and the lower clamp are this design's choices.
module freq_div #(
  parameter int unsigned DIV_W = 12
) (
  input  logic             clk,    // DCO output (ckout)
  input  logic             rst_n,  // asynchronous reset, active low
  input  logic [DIV_W-1:0] n_div,  // division ratio N
  output logic             hsout   // clk divided by N
);
  timeunit 1ps; timeprecision 1fs;

  logic [DIV_W-1:0] cnt, n_cur;
  logic [DIV_W-1:0] n_clamped;

  assign n_clamped = (n_div < DIV_W'(2)) ? DIV_W'(2) : n_div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      n_cur <= n_clamped;
      hsout <= 1'b0;
    end else if (cnt == n_cur - DIV_W'(1)) begin
      cnt   <= '0;
      n_cur <= n_clamped;
      hsout <= 1'b1;
    end else begin
      cnt <= cnt + DIV_W'(1);
      if (cnt + DIV_W'(1) == (n_cur >> 1)) hsout <= 1'b0;
    end
  end

  // the counter never passes the ratio in use
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt < n_cur);
endmodule
