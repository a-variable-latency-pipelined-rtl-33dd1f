// tb_fpa_onecycle_pred: checks the early CLOSE/FAR signal against the true
// exponent difference, and the one-cycle signal of the default configuration
// against the completion rule: CLOSE additions always; CLOSE subtractions
// when the larger exponent is at least 4 and the difference of the aligned
// significands needs a normalizing shift of at most 2 (a true shift of 3 may
// go either way, since the small predictor may be one place short, and must
// agree with the full predictor fpa_lop); never with Inf/NaN operands.
// The significands are built like the CLOSE path's aligned pair, often with
// matching top bits so that every shift from 0 to 5 occurs.
module tb_fpa_onecycle_pred;
  import fpa_pkg::*;
  logic [10:0] ea, eb;
  logic        eff_sub, special, close, one_cycle;
  logic [3:0]  x_top, y_top;
  logic [53:0] x54, y54;
  logic [5:0]  lop_lz;
  int checks = 0, failures = 0;
  int n_one = 0, n_close = 0, n_sh3 = 0;

  fpa_onecycle_pred dut (.*);
  fpa_lop #(.W(54)) u_lop (.x(x54), .y(y54), .lz(lop_lz));

  assign x_top = x54[53:50];
  assign y_top = y54[53:50];

  function automatic int lz54(logic [53:0] v);
    for (int i = 53; i >= 0; i--) if (v[i]) return 53 - i;
    return 54;
  endfunction

  initial begin
    int x, y, diff, sh;
    bit ec, eo, either;
    logic [52:0] sx, sy;
    for (int n = 0; n < 20000; n++) begin
      x = $urandom_range(1, 2046);
      y = (n % 2) ? $urandom_range(1, 2046) : x + $urandom_range(0, 4) - 2;
      if (y < 1) y = 1;
      if (y > 2047) y = 2047;
      if (n % 7 == 0) x = $urandom_range(1, 5);
      ea = 11'(x); eb = 11'(y);
      eff_sub = $urandom_range(0, 1) != 0;
      special = ($urandom_range(0, 15) == 0);
      sx = {$urandom_range(0, 7) != 0, 52'({$urandom(), $urandom()})};
      sy = {$urandom_range(0, 7) != 0, 52'({$urandom(), $urandom()})};
      if ($urandom_range(0, 1)) sy[52 -: 6] = sx[52 -: 6] ^ 6'($urandom_range(0, 7));
      x54 = {sx, 1'b0};
      y54 = ($urandom_range(0, 1) != 0) ? {1'b0, sy} : {sy, 1'b0};
      #1;
      diff = x - y;
      sh = lz54((x54 >= y54) ? x54 - y54 : y54 - x54);
      ec = (diff >= -1 && diff <= 1);
      either = ec && !special && eff_sub && (x >= 4 || y >= 4) && sh == 3;
      eo = ec && !special && (!eff_sub || (sh <= 2 && (x >= 4 || y >= 4)));
      checks++;
      n_close += int'(ec); n_one += int'(one_cycle);
      if (either) begin
        n_sh3++;
        eo = (lop_lz <= 2);
      end
      if (close != ec || one_cycle != eo) begin
        failures++;
        $display("FAIL ea=%0d eb=%0d sub=%0d sp=%0d shift=%0d: close=%0d one=%0d",
                 x, y, eff_sub, special, sh, close, one_cycle);
      end
    end
    $display("close %0d, one-cycle %0d, shift-3 subtractions %0d", n_close, n_one, n_sh3);
    if (n_one == 0 || n_close == 0 || n_sh3 == 0) failures++;
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
