// fpa_align_shift: FAR path alignment shifter (second cycle).
// Shifts the smaller operand's 53-bit significand right by the exponent
// difference d and keeps three places below it: guard, round and sticky,
// the sticky place being the OR of every bit shifted past the round place.
// Shifts of 56 or more leave only the sticky bit. Combinational.
// The full-length aligning shift follows the FAR path; the guard/round/
// sticky format is this design's choice.
module fpa_align_shift
  import fpa_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  input  logic [EXP_W-1:0] d,
  output logic [SIG_W+2:0] aligned   // {sig >> d, guard, round, sticky}
);

  logic [2*SIG_W+2:0] wide;   // sig followed by 56 zero places

  always_comb begin
    wide = {sig, {(SIG_W + 3){1'b0}}} >> d;
    if (d >= EXP_W'(SIG_W + 3)) begin
      aligned = {{(SIG_W + 2){1'b0}}, |sig};
    end else begin
      aligned = {wide[2*SIG_W+2:SIG_W+1], |wide[SIG_W:0]};
    end
  end

endmodule
