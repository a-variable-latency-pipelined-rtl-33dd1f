// tb_fpa_norm_shift: builds CLOSE path subtractions (exponents equal or one
// apart, deep cancellation and tiny exponents included), works out the
// unnormalized magnitude |X - Y| and its sign here, feeds it with a shift
// prediction that is either exact or one short, and compares the normalized
// and rounded result with the reference model.
module tb_fpa_norm_shift;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  logic [53:0] mag;
  logic        sign;
  logic [10:0] e_big;
  logic [5:0]  lop_lz;
  rmode_e      rm;
  logic [63:0] result;
  int checks = 0, failures = 0, n_sub = 0, n_zero = 0;

  fpa_norm_shift dut (.*);

  function automatic int lz54(logic [53:0] v);
    for (int i = 53; i >= 0; i--) if (v[i]) return 53 - i;
    return 54;
  endfunction

  initial begin
    logic [63:0] wa, wb, ev;
    int ea, eb, tl;
    logic [52:0] sa, sb;
    logic [53:0] x, y;
    logic        xs;
    for (int n = 0; n < 30000; n++) begin
      ea = $urandom_range(0, 2046);
      if (n % 4 == 0) ea = $urandom_range(0, 60);
      eb = ea + $urandom_range(0, 2) - 1;
      if (eb < 0) eb = 0;
      if (eb > 2046) eb = 2046;
      wa = {$urandom_range(0, 1) != 0, 11'(ea), 52'({$urandom(), $urandom()})};
      wb = {~wa[63], 11'(eb), 52'({$urandom(), $urandom()})};   // effective subtraction
      if (n % 2 == 0) wb[51:0] = wa[51:0] ^ 52'($urandom_range(0, 1023) << $urandom_range(0, 30));
      if (n % 50 == 0) begin wb = wa ^ 64'h8000_0000_0000_0000; eb = ea; end
      rm = rmode_e'($urandom_range(0, 3));
      sa = {ea != 0, wa[51:0]};
      sb = {eb != 0, wb[51:0]};
      if (ea == 0) ea = 1;   // a subnormal's exponent reads as 1
      if (eb == 0) eb = 1;
      if (eb > ea) begin x = {sb, 1'b0}; y = {1'b0, sa}; xs = wb[63]; end
      else if (ea > eb) begin x = {sa, 1'b0}; y = {1'b0, sb}; xs = wa[63]; end
      else begin x = {sa, 1'b0}; y = {sb, 1'b0}; xs = wa[63]; end
      mag    = (x >= y) ? x - y : y - x;
      sign   = xs ^ (x < y);
      e_big  = 11'((ea > eb) ? ea : eb);
      tl     = lz54(mag);
      lop_lz = (tl >= 54) ? 6'd53 : 6'(tl - ((tl > 0) ? $urandom_range(0, 1) : 0));
      #1;
      ev = ref_add(wa, wb, 1'b0, rm);
      checks++;
      n_sub++;
      if (ev[62:0] == 0) n_zero++;
      if (result !== ev) begin
        failures++;
        $display("FAIL %h + %h rm=%0d lz=%0d: got %h expected %h", wa, wb, rm, lop_lz, result, ev);
      end
    end
    if (n_zero == 0) failures++;
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
