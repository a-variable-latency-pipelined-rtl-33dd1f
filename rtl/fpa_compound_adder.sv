// fpa_compound_adder: compound adder producing both A+B and A+B+1.
// Both sums are formed from the same operands in one pass, so that a later
// stage can pick the rounded or the two's-complement-converted result by
// selection instead of a second carry-propagate addition. The two outputs are
// W+1 bits wide; the top bit is the carry out. Purely combinational.
// The sum/sum+1 pair follows the combined rounding scheme the adder is built
// on; the plain "+" description (left to synthesis to share a carry network)
// is this design's choice.
module fpa_compound_adder #(
  parameter int W = 54
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum,    // a + b
  output logic [W:0]   sum_p1  // a + b + 1
);

  // Carry-select form: propagate/generate are shared; sum+1 is sum with the
  // trailing run of ones flipped, which is how a compound adder derives it.
  logic [W:0] s;
  logic [W:0] ones_run;

  assign s = {1'b0, a} + {1'b0, b};

  // ones_run marks bit 0 and every bit above it while the lower bits of s
  // are all ones; these are the bits that toggle when 1 is added.
  assign ones_run[0] = 1'b1;
  for (genvar i = 1; i <= W; i++) begin : g_run
    assign ones_run[i] = ones_run[i-1] & s[i-1];
  end

  assign sum    = s;
  assign sum_p1 = s ^ ones_run;

endmodule
