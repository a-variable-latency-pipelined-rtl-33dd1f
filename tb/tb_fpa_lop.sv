// tb_fpa_lop: checks the leading-one predictor against an exact leading-zero
// count of |x - y|. The prediction must equal the true count or be one less.
// Operand pairs are drawn as in the CLOSE path: equal-exponent significands
// (d = 0) and significands with one operand shifted right one place (d = 1),
// plus pairs built to cancel many leading bits.
module tb_fpa_lop;
  localparam int W = 54;
  logic [W-1:0] x, y;
  logic [5:0] lz;
  int checks = 0, failures = 0;
  int exact_hits = 0;

  fpa_lop dut (.x(x), .y(y), .lz(lz));

  function automatic int true_lz(logic [W-1:0] v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return W - 1 - i;
    return W;
  endfunction

  task automatic check_pair(logic [W-1:0] xx, logic [W-1:0] yy);
    logic [W-1:0] m;
    int tl;
    x = xx; y = yy;
    #1;
    m  = (xx >= yy) ? xx - yy : yy - xx;
    tl = true_lz(m);
    checks++;
    if (m == 0) begin
      if (lz != 6'(W - 1)) begin failures++; $display("FAIL zero: lz=%0d", lz); end
    end else if (!(int'(lz) == tl || int'(lz) + 1 == tl)) begin
      failures++;
      $display("FAIL x=%h y=%h true=%0d pred=%0d", xx, yy, tl, lz);
    end else if (int'(lz) == tl) exact_hits++;
  endtask

  initial begin
    logic [52:0] sa, sb;
    for (int n = 0; n < 20000; n++) begin
      sa = {1'b1, $urandom(), $urandom()};
      sb = {1'b1, $urandom(), $urandom()};
      // build near-cancelling operands now and then
      if (n % 3 == 1) sb = sa ^ (53'($urandom() & 32'hFF) << $urandom_range(0, 44));
      if (n % 3 == 2) sb = sa - 53'($urandom_range(0, 1000));
      sb[52] = 1'b1;
      check_pair({sa, 1'b0}, {sb, 1'b0});        // d = 0
      check_pair({sa, 1'b0}, {1'b0, sb});        // d = 1
    end
    check_pair({1'b1, 53'd0}, {1'b0, {53{1'b1}}});
    check_pair({1'b1, 53'd0}, {1'b1, 53'd0});
    check_pair('0, '0);
    check_pair(54'd1, '0);
    if (exact_hits == 0) begin failures++; $display("FAIL: never exact"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
