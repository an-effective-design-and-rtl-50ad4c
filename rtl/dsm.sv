// dsm: first-order delta-sigma modulator for the DCO control code.
//
// The 19-bit control word holds a 10-bit integral part (bits 18:9) and a
// 9-bit fractional part (bits 8:0). Each DCO clock the fraction is added to a
// 9-bit accumulator; the carry out is added to the integral code, so the
// 10-bit code sent to the DCO toggles between k and k+1 with a duty equal to
// the fraction and its average over 512 clocks equals the 19-bit word
// (resolution 1/512 of an integral step). At the top code the carry is
// dropped. With en low the modulator is off: the accumulator is cleared and
// the integral part is passed straight through (registered).
//
// The word comes from the controller, which runs on the reference clock. It
// changes at most once per reference period, far slower than the DCO clock,
// and is taken into the DCO clock domain through two register stages: a new
// value is used only once both stages hold the same word, so a word caught
// while changing is never used. Output latency is four DCO clocks.
// First order, 19 bits in and 10 bits out follow the document; the
// clocking and the domain crossing are this design's choices.
module dsm
  import dpll_pkg::*;
(
  input  logic              clk,       // DCO output (ckout)
  input  logic              rst_n,     // asynchronous reset, active low
  input  logic              en,        // modulator on (fractional states)
  input  code_t             code_in,   // 19-bit dco_code from the controller
  output logic [INT_W-1:0]  code_out   // 10-bit code D<9:0> to the DCO
);
  timeunit 1ps; timeprecision 1fs;

  code_t             s1, s2, cur;
  logic              en1, en2, en_cur;
  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   sum;
  logic [INT_W-1:0]  ipart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; cur <= '0;
      en1 <= 1'b0; en2 <= 1'b0; en_cur <= 1'b0;
    end else begin
      s1  <= code_in; s2  <= s1;
      en1 <= en;      en2 <= en1;
      if (s1 == s2 && en1 == en2) begin
        cur    <= s2;
        en_cur <= en2;
      end
    end
  end

  assign ipart = cur[CODE_W-1:FRAC_W];
  assign sum   = {1'b0, acc} + {1'b0, cur[FRAC_W-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      code_out <= '0;
    end else if (!en_cur) begin
      acc      <= '0;
      code_out <= ipart;
    end else begin
      acc <= sum[FRAC_W-1:0];
      if (sum[FRAC_W] && ipart != '1) code_out <= ipart + INT_W'(1);
      else                            code_out <= ipart;
    end
  end
endmodule
