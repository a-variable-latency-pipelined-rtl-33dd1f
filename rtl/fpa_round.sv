// fpa_round: rounding and packing of a binary64 result.
// Input is a sign, an exponent (biased, 12 bits so that an overflowed value
// can be represented), a 53-bit significand whose top bit has the weight of
// the exponent, and the guard and sticky bits below it. The rounding bits
// (sign, LSB, guard, sticky) and the mode decide whether to select the
// significand or its increment, both taken from a compound incrementer. A
// carry out of the increment shifts right one bit and bumps the exponent. An
// exponent of 2047 or more overflows to Inf or to the largest finite number,
// as the mode requires. A significand whose top bit is 0 (after rounding) is
// subnormal and is packed with exponent field 0. Combinational.
// It rounds the CLOSE path results (the FAR path rounds inside its own
// compound adder). Rounding by selecting between a value and its increment
// follows the combined rounding scheme; a separate incrementer after
// normalization is this design's choice.
module fpa_round
  import fpa_pkg::*;
(
  input  logic          sign,
  input  logic [11:0]   exp,
  input  logic [52:0]   sig,
  input  logic          guard,
  input  logic          sticky,
  input  rmode_e        rm,
  output logic [63:0]   result,
  output logic          inexact,
  output logic          overflow
);

  logic        up;
  logic [53:0] sig_inc, sig_keep;
  logic [52:0] sig_r;
  logic [12:0] exp_r;

  fpa_compound_adder #(.W(53)) u_inc (
    .a      (sig),
    .b      ('0),
    .sum    (sig_keep),
    .sum_p1 (sig_inc)
  );

  always_comb begin
    inexact = guard | sticky;
    up      = round_up(rm, sign, sig[0], guard, sticky);

    if (up && sig_inc[53]) begin
      sig_r = sig_inc[53:1];
      exp_r = {1'b0, exp} + 13'd1;
    end else begin
      sig_r = up ? sig_inc[52:0] : sig_keep[52:0];
      exp_r = {1'b0, exp};
    end

    overflow = (exp_r >= 13'd2047);
    if (overflow) begin
      result = overflow_result(rm, sign);
    end else begin
      result = {sign, (sig_r[52] ? exp_r[10:0] : 11'd0), sig_r[51:0]};
    end
  end

endmodule
