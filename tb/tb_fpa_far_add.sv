// tb_fpa_far_add: builds FAR path operations (exponent difference of two or
// more, with short distances that exercise the one-place left shift,
// near-overflow sums, and sums that round up to the next power of two),
// aligns the smaller significand here with a wide shift and sticky OR, and
// compares the third-stage result with the reference model in all rounding
// modes.
module tb_fpa_far_add;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  logic [52:0] x;
  logic [55:0] y;
  logic [10:0] e_big;
  logic        sign, eff_sub;
  rmode_e      rm;
  logic [63:0] result;
  int checks = 0, failures = 0, n_lshift = 0, n_ovf = 0, n_carry = 0;

  fpa_far_add dut (.*);

  initial begin
    logic [63:0] wa, wb, ev;
    logic [179:0] wide;
    logic sub, sub_pre;
    int ea, eb, dd;
    for (int n = 0; n < 30000; n++) begin
      sub_pre = $urandom_range(0, 1);
      ea = $urandom_range(3, 2046);
      if (n % 10 == 0) ea = $urandom_range(2040, 2046);
      dd = (n % 2) ? $urandom_range(2, 6) : $urandom_range(2, 2000);
      eb = ea - dd;
      if (eb < 0) eb = 0;
      wa = {$urandom_range(0, 1) != 0, 11'(ea), 52'({$urandom(), $urandom()})};
      wb = {$urandom_range(0, 1) != 0, 11'(eb), 52'({$urandom(), $urandom()})};
      if (n % 4 == 0) wa[51:0] = 52'($urandom_range(0, 3));     // 1.0x: left shift likely
      if (n % 10 == 0) wa[51:0] = 52'hF_FFFF_FFFF_FFF0;         // sum may overflow
      if (n % 10 == 5) begin                                     // rounding carry out
        ea = $urandom_range(100, 2000);
        wa = {wa[63], 11'(ea), 52'hF_FFFF_FFFF_FFFF};
        wb = {wa[63] ^ sub_pre, 11'(ea - $urandom_range(2, 60)), 52'({$urandom(), $urandom()})};
      end
      sub = sub_pre;
      rm  = rmode_e'($urandom_range(0, 3));
      if ($urandom_range(0, 1)) begin   // larger operand second
        logic [63:0] t;
        t = wa; wa = wb; wb = t;
      end
      begin
        fp_unpacked_t ua, ub, xb, sm;
        ua = fp_unpack(wa);
        ub = fp_unpack(wb);
        ub.sign = ub.sign ^ sub;
        xb = (ub.exp > ua.exp) ? ub : ua;
        sm = (ub.exp > ua.exp) ? ua : ub;
        x = xb.sig; e_big = xb.exp; sign = xb.sign; eff_sub = ua.sign ^ ub.sign;
        wide = {sm.sig, 127'd0} >> (xb.exp - sm.exp);
        y = (xb.exp - sm.exp >= 127) ? {55'd0, |sm.sig} : {wide[179:125], |wide[124:0]};
      end
      #1;
      ev = ref_add(wa, wb, sub, rm);
      checks++;
      if (eff_sub && int'(ev[62:52]) < int'(e_big)) n_lshift++;
      if (!eff_sub && ev[51:0] == 0 && int'(ev[62:52]) == int'(e_big) + 1) n_carry++;
      if (ev[62:52] == 11'h7FF || (ev[62:52] == 11'h7FE && ev[51:0] == '1)) n_ovf++;
      if (result !== ev) begin
        failures++;
        $display("FAIL %h %s %h rm=%0d: got %h expected %h", wa, sub ? "-" : "+", wb, rm, result, ev);
      end
    end
    $display("left shifts %0d, overflows %0d, rounding carries %0d", n_lshift, n_ovf, n_carry);
    if (n_lshift == 0 || n_ovf == 0 || n_carry == 0) failures++;
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
