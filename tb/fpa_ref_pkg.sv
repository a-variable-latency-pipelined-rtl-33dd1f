// fpa_ref_pkg: reference model of binary64 addition for the testbenches.
// It works differently from the adder: both significands are placed in one
// wide two's complement fixed-point word (64 extra places below the larger
// operand's last place, anything further folded into a sticky bit), added
// with the signs applied, and the exact sum is normalized by a search for
// its leading one and rounded once. Inf/NaN follow the same conventions as
// the adder: a NaN operand comes back quieted (A before B), Inf - Inf gives
// 7FF8_0000_0000_0000. An exact zero sum of opposite signs is -0 only when
// rounding towards -Inf.
package fpa_ref_pkg;

  localparam int FW = 120;   // fixed-point width

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b,
                                          logic sub, logic [1:0] rm);
    logic        sa, sb, sign;
    int          ea, eb, eb_big, d, p, e, sh;
    logic [52:0] ma, mb;
    logic signed [FW-1:0] va, vb, r;
    logic [FW-1:0] big, sml, mag, sig, rest;
    logic        g, st, up, swap;
    sa = a[63];
    sb = b[63] ^ sub;
    // specials
    if (a[62:52] == 11'h7FF && a[51:0] != 0) return a | 64'h0008_0000_0000_0000;
    if (b[62:52] == 11'h7FF && b[51:0] != 0) return b | 64'h0008_0000_0000_0000;
    if (a[62:52] == 11'h7FF && b[62:52] == 11'h7FF)
      return (sa != sb) ? 64'h7FF8_0000_0000_0000 : {sa, 11'h7FF, 52'd0};
    if (a[62:52] == 11'h7FF) return {sa, 11'h7FF, 52'd0};
    if (b[62:52] == 11'h7FF) return {sb, 11'h7FF, 52'd0};
    ea = (a[62:52] == 0) ? 1 : int'(a[62:52]);
    eb = (b[62:52] == 0) ? 1 : int'(b[62:52]);
    ma = {a[62:52] != 0, a[51:0]};
    mb = {b[62:52] != 0, b[51:0]};
    swap   = eb > ea;
    eb_big = swap ? eb : ea;
    d      = swap ? eb - ea : ea - eb;
    // larger-exponent operand at bits [116:64]
    big   = FW'(swap ? mb : ma) << 64;
    sml = FW'(swap ? ma : mb) << 64;
    if (d > 100) sml = (sml != 0) ? FW'(1) : FW'(0);
    else begin
      rest  = sml & ((FW'(1) << d) - 1);
      sml = (sml >> d) | FW'(rest != 0);
    end
    va = (swap ? sb : sa) ? -$signed(big) : $signed(big);
    vb = (swap ? sa : sb) ? -$signed(sml) : $signed(sml);
    r  = va + vb;
    if (r == 0) return {(sa == sb) ? sa : (rm == 2'd3), 63'd0};
    sign = r < 0;
    mag  = sign ? FW'(-r) : FW'(r);
    p = 0;
    for (int i = 0; i < FW; i++) if (mag[i]) p = i;
    e  = eb_big + (p - 116);      // exponent of the leading one
    sh = p - 52;                  // right shift that leaves 53 bits
    if (e < 1) begin
      sh = sh + (1 - e);
      e  = 1;
    end
    if (sh > 0) begin
      sig = mag >> sh;
      g   = mag[sh-1];
      st  = (sh > 1) ? ((mag & ((FW'(1) << (sh - 1)) - 1)) != 0) : 1'b0;
    end else begin
      sig = mag << (-sh);
      g   = 1'b0;
      st  = 1'b0;
    end
    case (rm)
      2'd0:    up = g & (st | sig[0]);
      2'd1:    up = 1'b0;
      2'd2:    up = !sign && (g | st);
      default: up = sign && (g | st);
    endcase
    if (up) sig = sig + 1;
    if (sig[53]) begin
      sig = sig >> 1;
      e   = e + 1;
    end
    if (e >= 2047) begin
      if (rm == 2'd1 || (rm == 2'd2 && sign) || (rm == 2'd3 && !sign))
        return {sign, 11'h7FE, {52{1'b1}}};
      return {sign, 11'h7FF, 52'd0};
    end
    return {sign, sig[52] ? 11'(e) : 11'd0, sig[51:0]};
  endfunction

  function automatic bit is_nan(logic [63:0] w);
    return w[62:52] == 11'h7FF && w[51:0] != 0;
  endfunction

  // Exponent with a subnormal's 0 read as 1.
  function automatic int exp_of(logic [63:0] w);
    return (w[62:52] == 0) ? 1 : int'(w[62:52]);
  endfunction

endpackage
