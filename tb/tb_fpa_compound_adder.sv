// tb_fpa_compound_adder: checks sum = a + b and sum_p1 = a + b + 1 of the
// 54-bit compound adder on random operands and on operands that make long
// carry chains (all ones, sums of all ones, zero).
module tb_fpa_compound_adder;
  localparam int W = 54;
  logic [W-1:0] a, b;
  logic [W:0]   sum, sum_p1;
  int checks = 0, failures = 0;

  fpa_compound_adder dut (.*);

  task automatic check(logic [W-1:0] x, logic [W-1:0] y);
    logic [W+1:0] ref0, ref1;
    a = x; b = y; #1;
    ref0 = (W+2)'(x) + (W+2)'(y);
    ref1 = ref0 + 1;
    checks++;
    if (sum !== ref0[W:0] || sum_p1 !== ref1[W:0]) begin
      failures++;
      $display("FAIL a=%h b=%h sum=%h sum_p1=%h", x, y, sum, sum_p1);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) check({$urandom(), $urandom()}, {$urandom(), $urandom()});
    for (int n = 0; n < W; n++) check((W'(1) << n) - 1, '0);
    for (int n = 0; n < W; n++) check((W'(1) << n) - 1, W'(~((W'(1) << n) - 1)));
    check('1, '1); check('0, '0); check('1, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
