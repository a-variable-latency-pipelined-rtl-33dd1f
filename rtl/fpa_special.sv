// fpa_special: Inf and NaN operands.
// Flags an operation with an Inf or NaN operand and forms its result: a NaN
// operand is returned quieted (A's if A is a NaN, else B's), Inf - Inf gives
// the default quiet NaN 7FF8_0000_0000_0000, and otherwise the infinite
// operand is returned with its (effective) sign. Combinational. Such
// operations are sent down the three-cycle pipeline.
// Not part of the adder's published dataflow; IEEE 754 behaviour chosen
// here.
module fpa_special
  import fpa_pkg::*;
(
  input  logic [63:0]  a_raw,
  input  logic [63:0]  b_raw,
  input  fp_unpacked_t a,
  input  fp_unpacked_t b,        // sign includes the operation
  output logic         special,
  output logic [63:0]  result
);

  always_comb begin
    special = a.is_inf | a.is_nan | b.is_inf | b.is_nan;
    if (a.is_nan)                                   result = a_raw | 64'h0008_0000_0000_0000;
    else if (b.is_nan)                              result = b_raw | 64'h0008_0000_0000_0000;
    else if (a.is_inf && b.is_inf && (a.sign != b.sign)) result = QNAN;
    else if (a.is_inf)                              result = {a.sign, 11'h7FF, 52'd0};
    else                                            result = {b.sign, 11'h7FF, 52'd0};
  end

endmodule
