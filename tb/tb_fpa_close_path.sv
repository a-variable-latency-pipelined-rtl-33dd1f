// tb_fpa_close_path: drives the first-cycle CLOSE path with operand pairs
// whose exponents differ by at most one and checks (1) the unnormalized
// magnitude and its sign against |X - Y| worked out here, (2) the predicted
// shift against the true leading zeros (equal or one less), and (3) the
// finished result against the reference model for every case that may
// complete in one cycle: all effective additions, and effective
// subtractions with a true normalizing shift of at most 2 (so the predicted
// one is at most 2) and a larger exponent of at least 4; (4) the top bits
// of the aligned pair handed to the early predictor.
module tb_fpa_close_path;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  fp_unpacked_t a, b;
  rmode_e       rm;
  logic         eff_sub, mag_sign;
  logic [5:0]   lop_lz;
  logic [3:0]   x_top, y_top;
  logic [63:0]  result;
  logic [53:0]  mag;
  logic [10:0]  e_big;
  int checks = 0, failures = 0, n_add = 0, n_sub1 = 0;

  fpa_close_path dut (.*);

  function automatic int lz54(logic [53:0] v);
    for (int i = 53; i >= 0; i--) if (v[i]) return 53 - i;
    return 54;
  endfunction

  initial begin
    logic [63:0] wa, wb, ev;
    logic        sub;
    int          ea, eb, tl;
    logic [53:0] x, y, m;
    logic        xs;
    for (int n = 0; n < 30000; n++) begin
      ea = $urandom_range(0, 2046);
      if (n % 5 == 0) ea = $urandom_range(0, 4);
      eb = ea + $urandom_range(0, 2) - 1;
      if (eb < 0) eb = 0;
      if (eb > 2046) eb = 2046;
      wa = {$urandom_range(0, 1) != 0, 11'(ea), 52'({$urandom(), $urandom()})};
      wb = {$urandom_range(0, 1) != 0, 11'(eb), 52'({$urandom(), $urandom()})};
      if (n % 3 == 0) wb[51:0] = wa[51:0] ^ (52'($urandom_range(0, 255)) << $urandom_range(0, 44));
      sub = $urandom_range(0, 1);
      rm  = rmode_e'($urandom_range(0, 3));
      a = fp_unpack(wa);
      b = fp_unpack(wb);
      b.sign = b.sign ^ sub;
      #1;
      // magnitude worked out from the operands
      if (b.exp > a.exp) begin x = {b.sig, 1'b0}; y = {1'b0, a.sig}; xs = b.sign; end
      else if (a.exp > b.exp) begin x = {a.sig, 1'b0}; y = {1'b0, b.sig}; xs = a.sign; end
      else begin x = {a.sig, 1'b0}; y = {b.sig, 1'b0}; xs = a.sign; end
      checks++;
      if (eff_sub != (a.sign ^ b.sign) || int'(e_big) != ((a.exp > b.exp) ? a.exp : b.exp)) begin
        failures++; $display("FAIL eff_sub/e_big for %h %h", wa, wb);
      end
      checks++;
      if (x_top != x[53:50] || y_top != y[53:50]) begin
        failures++; $display("FAIL top bits for %h %h: %h %h", wa, wb, x_top, y_top);
      end
      if (eff_sub) begin
        m  = (x >= y) ? x - y : y - x;
        tl = lz54(m);
        checks++;
        if (mag != m || (m != 0 && mag_sign != (xs ^ (x < y))) ||
            !(int'(lop_lz) == tl || int'(lop_lz) + 1 == tl || (m == 0 && lop_lz == 53))) begin
          failures++;
          $display("FAIL sub %h %h: mag=%h (exp %h) sign=%0d lz=%0d (true %0d)", wa, wb, mag, m, mag_sign, lop_lz, tl);
        end
      end
      ev = ref_add(wa, wb, sub, rm);
      if (!eff_sub || (tl <= 2 && e_big >= 4)) begin
        checks++;
        if (eff_sub) n_sub1++; else n_add++;
        if (result !== ev) begin
          failures++;
          $display("FAIL result %h %s %h rm=%0d: got %h expected %h", wa, sub ? "-" : "+", wb, rm, result, ev);
        end
      end
    end
    if (n_add == 0 || n_sub1 == 0) failures++;
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
