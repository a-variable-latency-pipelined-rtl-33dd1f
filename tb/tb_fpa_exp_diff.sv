// tb_fpa_exp_diff: checks |ea - eb|, the swap flag and the larger exponent
// on random and on equal or adjacent exponents.
module tb_fpa_exp_diff;
  logic [10:0] ea, eb, d, e_big;
  logic        b_big;
  int checks = 0, failures = 0;

  fpa_exp_diff dut (.*);

  task automatic check(int x, int y);
    int rd;
    ea = 11'(x); eb = 11'(y); #1;
    rd = (x > y) ? x - y : y - x;
    checks++;
    if (int'(d) != rd || b_big != (y > x) || int'(e_big) != ((x > y) ? x : y)) begin
      failures++;
      $display("FAIL ea=%0d eb=%0d d=%0d b_big=%0d e_big=%0d", x, y, d, b_big, e_big);
    end
  endtask

  initial begin
    int x;
    for (int n = 0; n < 5000; n++) begin
      x = $urandom_range(1, 2046);
      check(x, $urandom_range(1, 2046));
      check(x, x);
      if (x < 2046) begin check(x, x + 1); check(x + 1, x); end
    end
    check(1, 2046); check(2046, 1);
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
