// tb_fpa_round: checks the rounder. Round-to-nearest results are compared
// with the simulator's own double addition of the truncated value and a
// fraction of its last place (half a place for the guard bit, a quarter for
// the sticky bit), which rounds once, to nearest even. Directed modes are
// checked against the truncated value or its successor in magnitude.
// Overflow (exponent reaching 2047) is checked per mode.
module tb_fpa_round;
  import fpa_pkg::*;
  logic        sign, guard, sticky, inexact, overflow;
  logic [11:0] exp;
  logic [52:0] sig;
  rmode_e      rm;
  logic [63:0] result;
  int checks = 0, failures = 0;

  fpa_round dut (.*);

  function automatic logic [63:0] expected(logic s, int e, logic [52:0] m, logic g, logic st, rmode_e r);
    logic [63:0] trunc, succ, maxf, inf;
    real t, ulp;
    maxf  = {s, 11'h7FE, {52{1'b1}}};
    inf   = {s, 11'h7FF, 52'd0};
    if (e >= 2047) begin
      if (r == RM_RTZ || (r == RM_RUP && s) || (r == RM_RDN && !s)) return maxf;
      return inf;
    end
    trunc = {s, (m[52] ? 11'(e) : 11'd0), m[51:0]};
    succ  = trunc + 1;
    case (r)
      RM_RNE: begin
        // near the subnormal range half a place is not a double: use the
        // nearest-even rule directly there
        if (e < 60) return (g && (st || m[0])) ? succ : trunc;
        // ulp of the truncated value, as a double
        ulp = $bitstoreal({1'b0, 11'(e > 52 ? e - 52 : 1), 52'd0});
        if (e <= 52) ulp = $bitstoreal(64'd1) * (2.0 ** (e - 1));
        t = $bitstoreal(trunc);
        t = s ? t - (g * 0.5 + st * 0.25) * ulp : t + (g * 0.5 + st * 0.25) * ulp;
        return $realtobits(t);
      end
      RM_RTZ: return trunc;
      RM_RUP: return (!s && (g || st)) ? succ : trunc;
      default: return (s && (g || st)) ? succ : trunc;
    endcase
  endfunction

  task automatic check(logic s, int e, logic [52:0] m, logic g, logic st, rmode_e r);
    logic [63:0] ev;
    sign = s; exp = 12'(e); sig = m; guard = g; sticky = st; rm = r;
    #1;
    ev = expected(s, e, m, g, st, r);
    checks++;
    if (result !== ev || inexact != (g | st)) begin
      failures++;
      $display("FAIL s=%0d e=%0d m=%h g=%0d st=%0d rm=%0d: got %h expected %h", s, e, m, g, st, r, result, ev);
    end
  endtask

  initial begin
    logic [52:0] m;
    int e;
    for (int n = 0; n < 20000; n++) begin
      e = $urandom_range(1, 2046);
      if (n % 10 == 0) e = $urandom_range(1, 3);
      if (n % 10 == 1) e = 2046;
      m = {1'b1, 52'({$urandom(), $urandom()})};
      if (n % 7 == 0) m[20:0] = '1;
      if (n % 13 == 0) m[51:0] = '1;
      if (e == 1 && $urandom_range(0, 1)) m[52] = 1'b0;
      check($urandom_range(0, 1), e, m, $urandom_range(0, 1), $urandom_range(0, 1),
            rmode_e'($urandom_range(0, 3)));
    end
    for (int r = 0; r < 4; r++) begin
      check(0, 2047, {1'b1, 52'd5}, 0, 0, rmode_e'(r));
      check(1, 2047, {1'b1, 52'd5}, 0, 0, rmode_e'(r));
      check(0, 2046, '1, 1, 1, rmode_e'(r));
      check(1, 2046, '1, 1, 0, rmode_e'(r));
      check(0, 1, {1'b0, {52{1'b1}}}, 1, 1, rmode_e'(r));
    end
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
