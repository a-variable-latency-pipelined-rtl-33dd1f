// fpa_norm_shift: second-cycle CLOSE path normalization.
// Takes the unnormalized magnitude of a CLOSE path subtraction (54 bits:
// 53 significand places and one guard place), the leading-one prediction
// and the larger exponent. A full-length left shifter applies the predicted
// amount and a final one-place shift corrects the prediction when it was
// one short. The shift is limited to e_big-1 so that a result too small for
// a normal number comes out subnormal (exponent field 0). An exactly zero
// difference gives +0, or -0 when rounding towards -Inf. The guard place is
// non-zero only without cancellation, so the result is then rounded; shifted
// results are exact. Combinational.
// The shifter driven by the predictor follows the CLOSE path design; the
// subnormal limit and the zero sign rule are IEEE behaviour chosen here.
module fpa_norm_shift
  import fpa_pkg::*;
(
  input  logic [53:0]      mag,
  input  logic             sign,
  input  logic [EXP_W-1:0] e_big,
  input  logic [5:0]       lop_lz,
  input  rmode_e           rm,
  output logic [63:0]      result
);

  logic [EXP_W-1:0] lim, sh;
  logic [53:0]      ms;
  logic [63:0]      rounded;
  logic             r_inexact, r_ovf;

  always_comb begin
    lim = e_big - EXP_W'(1);
    sh  = (EXP_W'(lop_lz) < lim) ? EXP_W'(lop_lz) : lim;
    ms  = mag << sh;
    if (!ms[53] && sh < lim) begin
      ms = {ms[52:0], 1'b0};
      sh = sh + EXP_W'(1);
    end
  end

  fpa_round u_round (
    .sign(sign), .exp({1'b0, e_big - sh}), .sig(ms[53:1]), .guard(ms[0]),
    .sticky(1'b0), .rm(rm), .result(rounded), .inexact(r_inexact), .overflow(r_ovf)
  );

  always_comb begin
    if (mag == '0) result = {(rm == RM_RDN), 63'd0};
    else           result = rounded;
  end

endmodule
