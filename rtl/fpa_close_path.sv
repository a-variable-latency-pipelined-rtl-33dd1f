// fpa_close_path: first-cycle CLOSE path (exponent difference 0 or 1).
// The operand swap and the one-place alignment are decided from the two
// low-order exponent bits alone (01: A larger by one, 11: B larger by one,
// 00: equal), without waiting for the exponent subtractor. The larger-exponent
// significand X and the aligned other one Y are kept with one guard bit and
// fed to a compound adder (effective addition: X + Y; effective subtraction:
// X + ~Y and X + ~Y + 1). For a subtraction the compound pair also does the
// conversion: if X + ~Y + 1 carries out the difference is positive and is
// that sum, otherwise the magnitude is ~(X + ~Y) and the sign flips.
// In parallel a leading-one predictor estimates the normalizing shift.
// Two things leave the block:
//  * result: a finished, rounded binary64 word for the one-cycle cases, an
//    effective addition (at most a one-place right shift) or an effective
//    subtraction whose predicted shift is at most 2 (a small four-way mux
//    applies the predicted shift and the one-place correction). It is only
//    meaningful when fpa_onecycle_pred says one_cycle.
//  * mag / mag_sign / e_big / lop_lz: the unnormalized magnitude and what
//    the second-cycle normalizing shifter (fpa_norm_shift) needs.
//  * x_top / y_top: the top four bits of X and Y, for the small early
//    predictor in fpa_onecycle_pred.
// Inputs are valid only when the exponents really are close; b.sign must
// already include the operation (flipped for a subtract). Combinational.
// The datapath split follows the adder's CLOSE path; the guard-bit width and
// the shared rounder are this design's choices.
module fpa_close_path
  import fpa_pkg::*;
(
  input  fp_unpacked_t     a,
  input  fp_unpacked_t     b,
  input  rmode_e           rm,
  output logic             eff_sub,
  output logic [5:0]       lop_lz,
  output logic [3:0]       x_top,
  output logic [3:0]       y_top,
  output logic [63:0]      result,
  output logic [53:0]      mag,
  output logic             mag_sign,
  output logic [EXP_W-1:0] e_big
);

  logic [1:0]   dlo;
  logic         b_big, d1;
  fp_unpacked_t xo, yo;
  logic [53:0]  x54, y54, yop;
  logic [54:0]  sum, sum_p1;
  logic [53:0]  ms;
  logic [2:0]   sh;

  logic         r_sign, r_guard, r_sticky;
  logic [11:0]  r_exp;
  logic [52:0]  r_sig;
  logic         r_inexact, r_ovf;

  // swap and one-place alignment predicted from the low exponent bits
  always_comb begin
    dlo     = a.exp[1:0] - b.exp[1:0];
    b_big   = (dlo == 2'b11);
    d1      = dlo[0];
    xo      = b_big ? b : a;
    yo      = b_big ? a : b;
    eff_sub = a.sign ^ b.sign;
    e_big   = xo.exp;
    x54     = {xo.sig, 1'b0};
    y54     = d1 ? {1'b0, yo.sig} : {yo.sig, 1'b0};
    yop     = eff_sub ? ~y54 : y54;
  end

  fpa_compound_adder #(.W(54)) u_add (
    .a(x54), .b(yop), .sum(sum), .sum_p1(sum_p1)
  );

  fpa_lop #(.W(54)) u_lop (.x(x54), .y(y54), .lz(lop_lz));

  assign x_top = x54[53:50];
  assign y_top = y54[53:50];

  // conversion of a negative difference by selection
  always_comb begin
    if (sum_p1[54]) begin
      mag      = sum_p1[53:0];
      mag_sign = xo.sign;
    end else begin
      mag      = ~sum[53:0];
      mag_sign = ~xo.sign;
    end
  end

  // one-cycle result
  always_comb begin
    ms = '0;
    sh = '0;
    if (!eff_sub) begin
      r_sign = xo.sign;
      if (sum[54]) begin
        r_sig = sum[54:2]; r_guard = sum[1]; r_sticky = sum[0];
        r_exp = {1'b0, e_big} + 12'd1;
      end else begin
        r_sig = sum[53:1]; r_guard = sum[0]; r_sticky = 1'b0;
        r_exp = {1'b0, e_big};
      end
    end else begin
      // short normalizing shift: predicted amount 0..2 plus correction
      unique case (lop_lz[1:0])
        2'd0:    ms = mag;
        2'd1:    ms = {mag[52:0], 1'b0};
        default: ms = {mag[51:0], 2'b0};
      endcase
      sh = {1'b0, lop_lz[1:0]};
      if (!ms[53]) begin
        ms = {ms[52:0], 1'b0};
        sh = sh + 3'd1;
      end
      r_sign   = mag_sign;
      r_sig    = ms[53:1];
      r_guard  = ms[0];
      r_sticky = 1'b0;
      r_exp    = {1'b0, e_big} - 12'(sh);
    end
  end

  fpa_round u_round (
    .sign(r_sign), .exp(r_exp), .sig(r_sig), .guard(r_guard), .sticky(r_sticky),
    .rm(rm), .result(result), .inexact(r_inexact), .overflow(r_ovf)
  );

endmodule
