// fpa_far_add: FAR path third cycle (exponent difference above one) with
// combined rounding.
// The aligned smaller significand arrives as its upper 53 bits Yh and three
// places below them (guard, round, sticky). The larger significand X is
// always the minuend, so no conversion step is needed, and the result needs
// at most one place of normalization. Rounding is done by selecting among
// precomputed sums from one compound adder (sum and sum + 1), never by a
// separate increment:
//  * Effective addition. A row of half adders combines X and Yh above their
//    least significant bit; the carry out of the LSB position fills the empty
//    bottom place of the carry vector. The compound adder then gives
//    U = (X + Yh) >> 1 and U + 1, i.e. the sum and the sum plus two units,
//    which a carry out of the significand (one place of right shift) needs
//    for directed rounding. Without a carry out the sum is {U, p0} and its
//    increment is {U + 1, 0} or {U, 1} depending on the LSB p0.
//  * Effective subtraction. The compound adder gives X + ~Yh = X - Yh - 1
//    and X - Yh. If the low places are non-zero they borrow, so the upper
//    difference is X - Yh - 1 and its increment X - Yh; otherwise the
//    difference is exact. A result below one is shifted left one place.
// A rounding carry out of the significand bumps the exponent; an exponent of 2047 or more gives Inf or the
// largest finite number as the mode requires. FAR results are never
// subnormal. Combinational.
// The half-adder row and compound adder selection follow the combined
// rounding scheme of the FAR path; the exact bit bookkeeping is this
// design's.
module fpa_far_add
  import fpa_pkg::*;
(
  input  logic [SIG_W-1:0] x,        // larger significand
  input  logic [SIG_W+2:0] y,        // aligned smaller significand, G R S
  input  logic [EXP_W-1:0] e_big,
  input  logic             sign,     // sign of the larger operand
  input  logic             eff_sub,
  input  rmode_e           rm,
  output logic [63:0]      result
);

  logic [52:0] yh;
  logic [2:0]  low, low_neg;
  logic        p0, c0, borrow;
  logic [51:0] ha_p;              // half-adder sums above the LSB
  logic [52:0] ha_c;              // half-adder carries, shifted, c0 at bit 0
  logic [52:0] ca, cb;
  logic [53:0] s0, s1;            // compound adder: sum, sum + 1
  logic [52:0] u, u1, d, d1;
  logic [52:0] r_sig;
  logic [12:0] r_exp;
  logic        g, st, up;

  always_comb begin
    yh      = y[55:3];
    low     = y[2:0];
    low_neg = 3'(-low);
    borrow  = (low != 3'b000);
    // half-adder row for the addition
    p0      = x[0] ^ yh[0];
    c0      = x[0] & yh[0];
    ha_p    = x[52:1] ^ yh[52:1];
    ha_c    = {x[52:1] & yh[52:1], c0};
    ca      = eff_sub ? x   : {1'b0, ha_p};
    cb      = eff_sub ? ~yh : ha_c;
  end

  fpa_compound_adder #(.W(53)) u_comadd (.a(ca), .b(cb), .sum(s0), .sum_p1(s1));

  always_comb begin
    u  = s0[52:0];                // addition: (X + Yh) >> 1
    u1 = s1[52:0];
    d  = borrow ? s0[52:0] : s1[52:0];   // subtraction: upper difference
    d1 = s1[52:0];                       // its increment (needed if borrow)
    r_exp = {2'b0, e_big};
    if (!eff_sub) begin
      if (u[52]) begin
        // carry out of the significand: one place of right shift
        g  = p0;
        st = |low;
        up = round_up(rm, sign, u[0], g, st);
        r_exp = {2'b0, e_big} + 13'd1;
        // X + Yh is below 1.25 * 2^53, so U + 1 cannot carry out
        r_sig = up ? u1 : u;
      end else begin
        g  = low[2];
        st = |low[1:0];
        up = round_up(rm, sign, p0, g, st);
        if (!up)      r_sig = {u[51:0], p0};
        else if (!p0) r_sig = {u[51:0], 1'b1};
        else if (u1[52]) begin
          r_sig = {1'b1, 52'd0};           // rounded up to two units
          r_exp = {2'b0, e_big} + 13'd1;
        end else      r_sig = {u1[51:0], 1'b0};
      end
    end else begin
      if (d[52]) begin
        g  = low_neg[2];
        st = |low_neg[1:0];
        up = round_up(rm, sign, d[0], g, st);
        r_sig = up ? d1 : d;               // d1 <= X - Yh < 2^53
      end else begin
        // result below one: one place of left shift
        g  = low_neg[1];
        st = low_neg[0];
        up = round_up(rm, sign, low_neg[2], g, st);
        r_exp = {2'b0, e_big} - 13'd1;
        if (!up)              r_sig = {d[51:0], low_neg[2]};
        else if (!low_neg[2]) r_sig = {d[51:0], 1'b1};
        else if (d1[52]) begin
          r_sig = {1'b1, 52'd0};           // rounded back up to one
          r_exp = {2'b0, e_big};
        end else              r_sig = {d1[51:0], 1'b0};
      end
    end
    if (r_exp >= 13'd2047) result = overflow_result(rm, sign);
    else                   result = {sign, r_exp[10:0], r_sig[51:0]};
  end

endmodule
