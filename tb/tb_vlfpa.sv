// tb_vlfpa: end-to-end test of the variable latency adder at its default
// configuration (one-cycle completion of CLOSE path additions and of CLOSE
// path subtractions with a normalizing shift of up to two bits).
// A stream of operations, one per cycle with occasional gaps, mixes the
// cases the adder distinguishes: FAR path additions and subtractions (some
// needing the one-place left shift), CLOSE path additions, CLOSE path
// subtractions with short and long normalizing shifts and exact cancellation,
// subnormal and overflowing results, and Inf/NaN operands, in all four
// rounding modes. Each result is compared with an independent reference
// model (and, for round-to-nearest, with the simulator's own double
// addition). The testbench also predicts each operation's natural latency
// from its operands (3 for FAR and Inf/NaN, 1 or 2 for CLOSE), replays the
// bus rule (the oldest finished operation drives the bus, others wait a
// stage) and checks the exact cycle, tag and stage of every result, the
// early one-cycle signal and the scheduler notice. Every mechanism must be
// seen at least once.
module tb_vlfpa;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int NOPS = 20000;
  localparam int MAXC = NOPS + NOPS / 8 + 20;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [63:0] in_a, in_b;
  logic        in_sub;
  rmode_e      in_rm;
  logic [5:0]  in_tag;
  logic        pred_one_cycle, sched_valid, res_valid;
  logic [5:0]  sched_tag, res_tag;
  logic [1:0]  sched_cycles, res_stage;
  logic [63:0] res_value;

  vlfpa dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // per-cycle record of what was issued
  bit          iv   [MAXC];
  logic [63:0] ia   [MAXC], ib [MAXC], iexp [MAXC];
  logic [5:0]  itag [MAXC];
  int          inat [MAXC];     // natural latency, 0 if either is allowed (1/2)
  bit          idone[MAXC];
  int          iret [MAXC];     // cycle of retirement

  // mechanism counters
  int n_far = 0, n_far_lshift = 0, n_close_add1 = 0, n_close_sub1 = 0;
  int n_sub1_sh0 = 0, n_sub1_sh1 = 0, n_sub1_sh2 = 0, n_close_sub2 = 0;
  int n_special = 0, n_zero = 0, n_subnormal = 0, n_overflow = 0;
  int n_coll1 = 0, n_coll2 = 0, n_lat[4] = '{0, 0, 0, 0};
  int n_bubble = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic logic [63:0] mk(logic s, int e, logic [51:0] f);
    return {s, 11'(e), f};
  endfunction

  function automatic logic [51:0] rfrac();
    return {$urandom(), $urandom()} & 52'hF_FFFF_FFFF_FFFF;
  endfunction

  // draw one operation
  task automatic gen(output logic [63:0] a, output logic [63:0] b, output logic sub);
    int k, e;
    logic [51:0] f;
    k   = $urandom_range(0, 99);
    sub = $urandom_range(0, 1);
    e   = $urandom_range(4, 2040);
    a   = mk($urandom_range(0, 1), e, rfrac());
    if (k < 20) begin            // FAR, random distance
      b = mk($urandom_range(0, 1), $urandom_range(1, 2046), rfrac());
    end else if (k < 30) begin   // FAR, distance 2..60
      b = mk($urandom_range(0, 1), e - $urandom_range(2, 60), rfrac());
    end else if (k < 45) begin   // CLOSE, random signs
      b = mk($urandom_range(0, 1), e + $urandom_range(0, 2) - 1, rfrac());
    end else if (k < 65) begin   // CLOSE subtraction, few cancelled bits
      f = a[51:0] ^ (52'($urandom()) << $urandom_range(0, 40));
      if ($urandom_range(0, 1)) f = f ^ 52'h8_0000_0000_0000;
      b = mk(a[63] ^ sub ^ 1'b1, e + $urandom_range(0, 1) * (($urandom_range(0, 1) != 0) ? 1 : -1), f);
    end else if (k < 75) begin   // CLOSE subtraction, deep cancellation
      f = a[51:0] ^ 52'($urandom_range(0, 255));
      b = mk(a[63] ^ sub ^ 1'b1, e, f);
      if ($urandom_range(0, 9) == 0) b = a ^ {sub, 63'd0} ^ 64'h8000_0000_0000_0000;
    end else if (k < 82) begin   // tiny operands, subnormal results
      a = mk($urandom_range(0, 1), $urandom_range(0, 3), rfrac());
      b = mk($urandom_range(0, 1), $urandom_range(0, 3), rfrac());
    end else if (k < 89) begin   // near overflow
      a = mk(1'b0, $urandom_range(2044, 2046), rfrac() | 52'hF_0000_0000_0000);
      b = mk(sub, $urandom_range(2043, 2046), rfrac());
    end else if (k < 93) begin   // Inf / NaN
      a = ($urandom_range(0, 2) == 0) ? {1'b0, 11'h7FF, 52'd0 | 52'($urandom_range(0, 3))}
                                      : mk($urandom_range(0, 1), e, rfrac());
      b = {$urandom_range(0, 1) != 0, 11'h7FF, ($urandom_range(0, 1) != 0) ? 52'd0 : rfrac()};
      if ($urandom_range(0, 1)) begin logic [63:0] t = a; a = b; b = t; end
    end else begin               // zeros and exact results
      a = ($urandom_range(0, 1) != 0) ? {$urandom_range(0, 1) != 0, 63'd0} : a;
      b = {$urandom_range(0, 1) != 0, 63'd0};
      if ($urandom_range(0, 1)) begin logic [63:0] t = a; a = b; b = t; end
    end
  endtask

  function automatic int lz54(logic [53:0] v);
    for (int i = 53; i >= 0; i--) if (v[i]) return 53 - i;
    return 54;
  endfunction

  // natural latency from the operands: 1, 2, 3, or 0 for "1 or 2"
  function automatic int natural_latency(logic [63:0] a, logic [63:0] b, logic sub,
                                         output int kind, output int shift);
    int ea, eb, eff, ebig;
    logic [53:0] x, y, m;
    kind = 0; shift = 0;
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) begin kind = 4; return 3; end
    ea = exp_of(a); eb = exp_of(b);
    if (ea - eb > 1 || eb - ea > 1) begin kind = 1; return 3; end
    eff = a[63] ^ b[63] ^ sub;
    if (!eff) begin kind = 2; return 1; end
    kind = 3;
    ebig = (ea > eb) ? ea : eb;
    x = (eb > ea) ? {1'b0, b[62:52] != 0, b[51:0]} : {1'b0, a[62:52] != 0, a[51:0]};
    y = (eb > ea) ? {1'b0, a[62:52] != 0, a[51:0]} : {1'b0, b[62:52] != 0, b[51:0]};
    x = x << 1;
    y = (ea != eb) ? y : y << 1;
    m = (x >= y) ? x - y : y - x;
    shift = lz54(m);
    if (ebig < 4) return 2;
    if (shift <= 2) return 1;
    if (shift >= 4) return 2;
    return 0;
  endfunction

  initial begin
    logic [63:0] a, b, exp_v, hw;
    logic        sub;
    int          kind, shift, nat, cyc, win;
    real         ra, rb;
    rst_n = 1'b0; in_valid = 1'b0; in_a = '0; in_b = '0; in_sub = 1'b0;
    in_rm = RM_RNE; in_tag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < MAXC; cyc++) begin
      // drive at the falling edge
      iv[cyc] = ($urandom_range(0, 15) != 0) && (cyc < MAXC - 8);
      if (iv[cyc]) begin
        gen(a, b, sub);
        in_rm = rmode_e'($urandom_range(0, 3));
        exp_v = ref_add(a, b, sub, in_rm);
        if (in_rm == RM_RNE && !is_nan(exp_v)) begin
          ra = $bitstoreal(a); rb = $bitstoreal(b);
          hw = $realtobits(sub ? ra - rb : ra + rb);
          checks++;
          if (hw != exp_v) fail($sformatf("reference model %h %h sub=%0d: %h vs %h", a, b, sub, exp_v, hw));
        end
        nat = natural_latency(a, b, sub, kind, shift);
        ia[cyc] = a; ib[cyc] = b; iexp[cyc] = exp_v; itag[cyc] = 6'(cyc);
        inat[cyc] = nat; idone[cyc] = 1'b0;
        case (kind)
          1: begin
               n_far++;
               if ((a[63] ^ b[63] ^ sub) && !is_nan(exp_v) && exp_v[62:52] != 0 &&
                   int'(exp_v[62:52]) < ((exp_of(a) > exp_of(b)) ? exp_of(a) : exp_of(b)))
                 n_far_lshift++;
             end
          4: n_special++;
          default: ;
        endcase
        if (exp_v[62:0] == 0) n_zero++;
        if (exp_v[62:52] == 0 && exp_v[51:0] != 0) n_subnormal++;
        if (exp_v[62:52] == 11'h7FF && kind != 4) n_overflow++;
        in_valid = 1'b1; in_a = a; in_b = b; in_sub = sub; in_tag = 6'(cyc);
      end else begin
        in_valid = 1'b0;
        in_a = {$urandom(), $urandom()}; in_b = {$urandom(), $urandom()};
        n_bubble++;
      end
      // sample just before the rising edge
      #4;
      if (iv[cyc]) begin
        checks++;
        if (inat[cyc] == 0) inat[cyc] = pred_one_cycle ? 1 : 2;
        else if (pred_one_cycle != (inat[cyc] == 1))
          fail($sformatf("pred_one_cycle=%0d, expected latency %0d for %h %h", pred_one_cycle, inat[cyc], ia[cyc], ib[cyc]));
        if (inat[cyc] == 1 && kind == 3) begin
          n_close_sub1++;
          if (shift == 0) n_sub1_sh0++;
          if (shift == 1) n_sub1_sh1++;
          if (shift == 2) n_sub1_sh2++;
        end
        if (inat[cyc] == 1 && kind == 2) n_close_add1++;
        if (inat[cyc] == 2 && kind == 3) n_close_sub2++;
      end
      // who should drive the bus: the oldest finished operation
      win = -1;
      for (int k = 2; k >= 0; k--) begin
        int c;
        c = cyc - k;
        if (win < 0 && c >= 0 && iv[c] && !idone[c] && inat[c] <= k + 1) win = c;
      end
      checks++;
      if (win < 0) begin
        if (res_valid) fail($sformatf("cycle %0d: unexpected result tag %0d", cyc, res_tag));
      end else begin
        idone[win] = 1'b1;
        iret[win]  = cyc;
        n_lat[cyc - win + 1]++;
        if (cyc - win + 1 > inat[win]) begin
          if (inat[win] == 1) n_coll1++; else n_coll2++;
        end
        if (!res_valid || res_tag != itag[win] || int'(res_stage) != cyc - win + 1)
          fail($sformatf("cycle %0d: expected tag %0d stage %0d, got valid=%0d tag %0d stage %0d",
                         cyc, itag[win], cyc - win + 1, res_valid, res_tag, res_stage));
        else begin
          checks++;
          if (is_nan(iexp[win]) ? (res_value != iexp[win]) : (res_value !== iexp[win]))
            fail($sformatf("%h %s %h: got %h expected %h", ia[win], "op", ib[win], res_value, iexp[win]));
        end
      end
      // scheduler notice for the operation issued last cycle
      if (cyc >= 1 && iv[cyc-1] && !(idone[cyc-1] && iret[cyc-1] == cyc - 1)) begin
        int expc;
        checks++;
        expc = (idone[cyc-1] && iret[cyc-1] == cyc) ? 1 : 2;
        if (!sched_valid || sched_tag != itag[cyc-1] || int'(sched_cycles) != expc)
          fail($sformatf("cycle %0d: sched valid=%0d tag=%0d cycles=%0d, expected tag %0d cycles %0d",
                         cyc, sched_valid, sched_tag, sched_cycles, itag[cyc-1], expc));
      end else if (sched_valid) fail($sformatf("cycle %0d: spurious sched_valid", cyc));
      @(negedge clk);
    end
    // every issued operation retired within three cycles
    for (int c = 0; c < MAXC; c++)
      if (iv[c] && !idone[c]) fail($sformatf("operation of cycle %0d never retired", c));
    $display("latency 1/2/3: %0d %0d %0d  bubbles %0d", n_lat[1], n_lat[2], n_lat[3], n_bubble);
    $display("far %0d (1-bit left shift %0d)  close add 1-cycle %0d  close sub 1-cycle %0d (shift 0/1/2: %0d %0d %0d)  close sub 2-cycle %0d",
             n_far, n_far_lshift, n_close_add1, n_close_sub1, n_sub1_sh0, n_sub1_sh1, n_sub1_sh2, n_close_sub2);
    $display("collisions stage1->2 %0d  stage2->3 %0d  special %0d  zero %0d  subnormal %0d  overflow %0d",
             n_coll1, n_coll2, n_special, n_zero, n_subnormal, n_overflow);
    if (n_far == 0)        fail("no FAR path operation");
    if (n_far_lshift == 0) fail("no FAR path subtraction with a left shift");
    if (n_close_add1 == 0) fail("no one-cycle CLOSE addition");
    if (n_sub1_sh0 == 0 || n_sub1_sh1 == 0 || n_sub1_sh2 == 0) fail("a one-cycle subtraction shift never seen");
    if (n_close_sub2 == 0) fail("no two-cycle CLOSE subtraction");
    if (n_coll1 == 0)      fail("no stage 1 collision");
    if (n_coll2 == 0)      fail("no stage 2 collision");
    if (n_special == 0 || n_zero == 0 || n_subnormal == 0 || n_overflow == 0)
      fail("a special result class never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (MAXC + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
