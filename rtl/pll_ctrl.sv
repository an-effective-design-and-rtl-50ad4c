// pll_ctrl: lock-in controller of the DPLL.
//
// Runs on the reference clock (hsync), one decision per reference period,
// from the PFD's direction levels of the previous comparison: LAG (the
// divided clock came first, the DCO is too fast) raises the 19-bit dco_code,
// which slows the DCO; LEAD lowers it. Lock-in goes through four states:
//
//   COARSE - binary search on the integral code dco_code[18:9]. The code
//            moves by `step` integral units per period in the direction the
//            PFD asks for. When the direction reverses (a polarity change),
//            the step is halved and, once the loop filter has a baseline,
//            dco_code is restored to avg_dco_code. The first step is 256.
//   FINE   - the same search once the step is at or below FINE_STEP0, down
//            to a step of 1. A polarity change at step 1 ends the search of
//            the integral code. The DSM is off in COARSE and FINE.
//   FRAC   - the DSM is switched on and the same search runs on the whole
//            word in units of one fractional LSB, starting at FRAC_STEP0.
//   TRACK  - entered on a polarity change at fractional step 1. A baseline
//            code moves by KI LSBs per period in the PFD's direction, and the
//            TDC's phase error is added to the fractional bits as an
//            immediate correction for one period:
//            dco_code = base +/- (KP * tdc magnitude) >> KP_SHIFT.
//            The default, a quarter LSB per TDC count, keeps this
//            proportional path well damped although the correction acts
//            one reference period after the error was measured.
//
// Every new dco_code is also handed to the loop filter (code_valid). All
// arithmetic saturates at 0 and 2^19-1. When neither LEAD nor LAG is high the
// code is held. Outputs are registered; a decision taken at reference edge k
// uses the comparison completed before edge k.
//
// From the document: the four states, the integral/fractional split, the
// binary search with step halving at polarity changes starting at 256, the
// restore of avg_dco_code and the TDC correction added to the fractional
// bits. This design's own choices: the step at which COARSE hands over to
// FINE, the fractional start step, the tracking gains, the initial code and
// holding when no direction is known.
module pll_ctrl
  import dpll_pkg::*;
#(
  parameter int unsigned COARSE_STEP0 = 256,  // first integral step
  parameter int unsigned FINE_STEP0   = 16,   // integral step where FINE starts
  parameter int unsigned FRAC_STEP0   = 256,  // first fractional step, LSBs
  parameter int unsigned KP           = 1,    // correction = KP * tdc >> KP_SHIFT
  parameter int unsigned KP_SHIFT     = 2,    //   (in fractional LSBs, TRACK)
  parameter int unsigned KI           = 1,    // baseline LSBs per period, TRACK
  parameter int unsigned INIT_INT     = 512   // integral code after reset
) (
  input  logic                clk,           // reference clock (hsync)
  input  logic                rst_n,         // asynchronous reset, active low
  input  logic                lead,          // PFD: speed the DCO up
  input  logic                lag,           // PFD: slow the DCO down
  input  logic [TDC_W:0]      tdc_code,      // {lag, 6-bit TDC magnitude}
  input  code_t               avg_dco_code,  // baseline from the loop filter
  input  logic                avg_valid,     // baseline available
  output code_t               dco_code,      // to the DSM and the loop filter
  output logic                code_valid,    // dco_code is new this cycle
  output logic                dsm_en,        // DSM on
  output lock_state_e         state,
  output logic [CODE_W-1:0]   step,          // current search step, code LSBs
  output logic                locked         // in TRACK
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned SW = CODE_W + 2;    // signed working width
  localparam logic signed [SW-1:0] CODE_MAX = SW'((1 << CODE_W) - 1);

  typedef logic signed [SW-1:0] scode_t;

  logic        dir_up, dir_dn, have_dir, prev_up;
  logic        flip;
  code_t       base;
  scode_t      moved, tracked, base_next, corr;

  function automatic code_t sat(scode_t x);
    if (x < 0)             return '0;
    else if (x > CODE_MAX) return '1;
    else                   return code_t'(x);
  endfunction

  assign dir_up = lag & ~lead;          // raise the code: slow down
  assign dir_dn = lead & ~lag;          // lower the code: speed up
  assign flip   = have_dir & (dir_up | dir_dn) & (dir_up != prev_up);

  always_comb begin
    moved     = dir_up ? scode_t'(dco_code) + scode_t'(step)
                       : scode_t'(dco_code) - scode_t'(step);
    base_next = dir_up ? scode_t'(base) + scode_t'(KI)
              : dir_dn ? scode_t'(base) - scode_t'(KI)
              :          scode_t'(base);
    // phase correction: hsout late (lead) -> lower the code, early -> raise
    corr = scode_t'((KP * tdc_code[TDC_W-1:0]) >> KP_SHIFT);
    if (tdc_code[TDC_W])
      tracked = base_next + corr;
    else if (dir_dn)
      tracked = base_next - corr;
    else
      tracked = base_next;
  end

  assign locked = (state == ST_TRACK);

  // the search step is always a single power of two
  a_step_pow2: assert property (@(posedge clk) disable iff (!rst_n)
                                step != '0 && (step & (step - code_t'(1))) == '0);
  // the DSM is on exactly in the fractional and tracking states
  a_dsm_state: assert property (@(posedge clk) disable iff (!rst_n)
                                dsm_en == (state == ST_FRAC || state == ST_TRACK));
  // FRAC is entered only from FINE, TRACK only from FRAC
  a_into_frac:  assert property (@(posedge clk) disable iff (!rst_n)
                                 state == ST_FRAC && $past(state) != ST_FRAC
                                 |-> $past(state) == ST_FINE);
  a_into_track: assert property (@(posedge clk) disable iff (!rst_n)
                                 state == ST_TRACK && $past(state) != ST_TRACK
                                 |-> $past(state) == ST_FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_COARSE;
      dco_code   <= code_t'(INIT_INT) << FRAC_W;
      base       <= '0;
      step       <= code_t'(COARSE_STEP0) << FRAC_W;
      dsm_en     <= 1'b0;
      code_valid <= 1'b0;
      have_dir   <= 1'b0;
      prev_up    <= 1'b0;
    end else begin
      code_valid <= 1'b1;
      if (dir_up | dir_dn) begin
        have_dir <= 1'b1;
        prev_up  <= dir_up;
      end
      unique case (state)
        ST_COARSE, ST_FINE: begin
          if (flip) begin
            if (avg_valid) dco_code <= avg_dco_code;
            if (step > (code_t'(1) << FRAC_W)) begin
              step  <= step >> 1;
              state <= ((step >> 1) <= (code_t'(FINE_STEP0) << FRAC_W))
                       ? ST_FINE : ST_COARSE;
            end else begin
              state  <= ST_FRAC;
              step   <= code_t'(FRAC_STEP0);
              dsm_en <= 1'b1;
            end
          end else if (dir_up | dir_dn) begin
            dco_code <= sat(moved);
          end
        end
        ST_FRAC: begin
          if (flip) begin
            if (avg_valid) dco_code <= avg_dco_code;
            if (step > code_t'(1)) begin
              step <= step >> 1;
            end else begin
              state <= ST_TRACK;
              base  <= avg_valid ? avg_dco_code : dco_code;
            end
          end else if (dir_up | dir_dn) begin
            dco_code <= sat(moved);
          end
        end
        ST_TRACK: begin
          base     <= sat(base_next);
          dco_code <= sat(tracked);
        end
        default: state <= ST_COARSE;
      endcase
    end
  end
endmodule
