// fpa_exp_diff: FAR path first stage. Subtracts the two (unpacked) exponents,
// takes the absolute difference d = |Ea - Eb|, and reports which operand is
// the larger so that the operands can be swapped and the smaller one later
// shifted right by d. On equal exponents operand A is taken as the larger.
// The larger exponent Ef is also returned. Combinational; in the pipeline it
// sits in the first cycle and its result selects the CLOSE or FAR path.
// Follows the exponent subtraction and swap step of the two-path adder; the
// tie rule (A on equal exponents) is this design's choice.
module fpa_exp_diff
  import fpa_pkg::*;
(
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  output logic [EXP_W-1:0] d,       // |ea - eb|
  output logic             b_big,   // eb > ea: swap the operands
  output logic [EXP_W-1:0] e_big    // max(ea, eb)
);

  logic [EXP_W:0] diff;

  always_comb begin
    diff  = {1'b0, ea} - {1'b0, eb};
    b_big = diff[EXP_W];
    d     = b_big ? EXP_W'(-diff) : diff[EXP_W-1:0];
    e_big = b_big ? eb : ea;
  end

endmodule
