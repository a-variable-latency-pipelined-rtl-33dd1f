// fpa_lop: leading-one predictor for the CLOSE path subtraction x - y.
// It works on the operands, in parallel with the significand adder, and
// predicts the number of leading zeros of |x - y| (both W bits, unsigned).
// Each bit position gets a flag from the transfer, generate and zero signals
// of x and ~y at that bit and its neighbours; the first flag from the top
// marks the leading one to within one place, so the true count is the
// predicted count or one more. The normalizing shifter corrects the last
// place. A result of zero gives a prediction of W-1.
// Combinational. The prediction is what lets the normalizing shift amount be
// known without waiting for the sum; the particular indicator equations are
// the standard sign-independent ones and are this design's choice.
module fpa_lop #(
  parameter int W  = 54,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  y,
  output logic [CW-1:0] lz      // predicted leading zeros of |x - y|
);

  // Operands of x + ~y with a sign bit on top: A = {0,x}, B = {1,~y}.
  logic [W:0] a, b, t, g, z;
  logic [W-1:0] f;

  always_comb begin
    a = {1'b0, x};
    b = {1'b1, ~y};
    t = a ^ b;
    g = a & b;
    z = ~a & ~b;
    for (int i = W - 1; i >= 1; i--) begin
      f[i] = ( t[i+1] & ((g[i] & ~z[i-1]) | (z[i] & ~g[i-1])))
           | (~t[i+1] & ((z[i] & ~z[i-1]) | (g[i] & ~g[i-1])));
    end
    f[0] = 1'b1;
    lz = CW'(W - 1);
    for (int i = 0; i < W; i++) if (f[i]) lz = CW'(W - 1 - i);
  end

endmodule
