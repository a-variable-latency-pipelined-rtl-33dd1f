// fpa_onecycle_pred: early prediction of a one-cycle operation.
// Two signals are formed well before the end of the first cycle.
//  * close: the exponents differ by at most one. It is found without the
//    exponent subtractor, by comparing each exponent with the other and with
//    the other plus one, which only asks whether the difference has a one
//    above its least significant bit.
//  * one_cycle: the operation will complete in the first cycle. A CLOSE path
//    effective addition always does (modes from LAT_ADDS up). A CLOSE path
//    effective subtraction does (modes LAT_SUBSk) when a small leading-one
//    predictor of its own puts the leading one of the difference within the
//    top k+1 bits, and the larger exponent is at least 4 so that the short
//    shift cannot reach the subnormal range. Inf and NaN operands never
//    complete early.
// The small predictor looks only at the top four bits of the two aligned
// CLOSE path significands (x_top, y_top). It forms the same position flags
// as the full predictor (fpa_lop) for the top three positions; each flag
// needs only its own bit and the bits on either side, so the answer equals
// "full prediction at most k" without waiting for the full priority encoder.
// Like the full predictor it may be one place short, so an operation whose
// true shift is k+1 may be predicted as one cycle; the first-cycle short
// shifter handles that extra place.
// Combinational. The CLOSE/FAR test and the separate predictor on the high
// order three significand bits follow the adder's early-prediction scheme;
// the exponent-at-least-4 guard and the exclusion of Inf/NaN are this
// design's.
module fpa_onecycle_pred
  import fpa_pkg::*;
#(
  parameter lat_mode_e LAT_MODE = LAT_SUBS2
) (
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  input  logic             eff_sub,
  input  logic             special,   // an operand is Inf or NaN
  input  logic [3:0]       x_top,     // top bits of the aligned CLOSE operands
  input  logic [3:0]       y_top,
  output logic             close,
  output logic             one_cycle
);

  logic       big_ok;
  logic [4:0] ta, tb, tt, tg, tz;
  logic [3:1] f;
  logic       lead_hit;

  // flags for the top three positions of x - y, from A = {0,x}, B = {1,~y}
  always_comb begin
    ta = {1'b0, x_top};
    tb = {1'b1, ~y_top};
    tt = ta ^ tb;
    tg = ta & tb;
    tz = ~ta & ~tb;
    for (int i = 3; i >= 1; i--) begin
      f[i] = ( tt[i+1] & ((tg[i] & ~tz[i-1]) | (tz[i] & ~tg[i-1])))
           | (~tt[i+1] & ((tz[i] & ~tz[i-1]) | (tg[i] & ~tg[i-1])));
    end
    case (LAT_MODE)
      LAT_SUBS0: lead_hit = f[3];
      LAT_SUBS1: lead_hit = |f[3:2];
      LAT_SUBS2: lead_hit = |f[3:1];
      default:   lead_hit = 1'b0;
    endcase
  end

  always_comb begin
    close  = (ea == eb) || (ea == eb + EXP_W'(1)) || (eb == ea + EXP_W'(1));
    big_ok = (|ea[EXP_W-1:2]) || (|eb[EXP_W-1:2]);
    one_cycle = 1'b0;
    if (close && !special) begin
      if (!eff_sub)
        one_cycle = (LAT_MODE != LAT_TWO_CYCLE);
      else
        one_cycle = big_ok && lead_hit;
    end
  end

endmodule
