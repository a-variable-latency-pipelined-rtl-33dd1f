// tb_vlfpa_modes: the four other latency configurations (LAT_TWO_CYCLE,
// LAT_ADDS, LAT_SUBS0, LAT_SUBS1) under the same full-rate mixed stream as
// the default-configuration test: four adders side by side, one operation
// per cycle with occasional gaps, all rounding modes, every case from FAR
// and CLOSE paths to subnormals, overflow, zeros, Inf and NaN. For each
// adder the testbench predicts every operation's natural latency under that
// configuration, replays the bus rule (the oldest finished operation drives
// the bus, the others wait a stage) and checks the value, cycle, tag and
// stage of every result, the early one-cycle signal and the scheduler
// notice, and that collisions in both stages happened.
module tb_vlfpa_modes;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int NOPS = 8000;
  localparam int MAXC = NOPS + NOPS / 8 + 20;
  localparam int NM   = 4;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [63:0] in_a, in_b;
  logic        in_sub;
  rmode_e      in_rm;
  logic [5:0]  in_tag;
  logic        pred_one_cycle [NM];
  logic        sched_valid    [NM];
  logic [5:0]  sched_tag      [NM];
  logic [1:0]  sched_cycles   [NM];
  logic        res_valid      [NM];
  logic [5:0]  res_tag        [NM];
  logic [63:0] res_value      [NM];
  logic [1:0]  res_stage      [NM];

  always #5 clk = ~clk;

  for (genvar m = 0; m < NM; m++) begin : g_dut
    vlfpa #(.LAT_MODE(lat_mode_e'(m))) dut (
      .clk, .rst_n, .in_valid, .in_a, .in_b, .in_sub, .in_rm, .in_tag,
      .pred_one_cycle(pred_one_cycle[m]), .sched_valid(sched_valid[m]),
      .sched_tag(sched_tag[m]), .sched_cycles(sched_cycles[m]),
      .res_valid(res_valid[m]), .res_tag(res_tag[m]), .res_value(res_value[m]),
      .res_stage(res_stage[m])
    );
  end

  int checks = 0, failures = 0;

  bit          iv   [MAXC];
  logic [63:0] ia   [MAXC], ib [MAXC], iexp [MAXC];
  int          ikind[MAXC], ishift[MAXC], iebig[MAXC];
  int          inat [NM][MAXC];
  bit          idone[NM][MAXC];
  int          iret [NM][MAXC];
  int          n_coll1 [NM], n_coll2 [NM], n_one [NM];

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

  // operand class: 1 FAR, 2 CLOSE addition, 3 CLOSE subtraction, 4 Inf/NaN;
  // for a CLOSE subtraction also the true normalizing shift
  function automatic int classify(logic [63:0] a, logic [63:0] b, logic sub,
                                  output int shift, output int ebig);
    int ea, eb;
    logic [53:0] x, y;
    shift = 0; ebig = 0;
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) return 4;
    ea = exp_of(a); eb = exp_of(b);
    if (ea - eb > 1 || eb - ea > 1) return 1;
    if (!(a[63] ^ b[63] ^ sub)) return 2;
    ebig = (ea > eb) ? ea : eb;
    x = (eb > ea) ? {1'b0, b[62:52] != 0, b[51:0]} : {1'b0, a[62:52] != 0, a[51:0]};
    y = (eb > ea) ? {1'b0, a[62:52] != 0, a[51:0]} : {1'b0, b[62:52] != 0, b[51:0]};
    x = x << 1;
    y = (ea != eb) ? y : y << 1;
    shift = lz54((x >= y) ? x - y : y - x);
    return 3;
  endfunction

  // natural latency under configuration m: 1, 2, 3, or 0 for "1 or 2"
  function automatic int natural_latency(int m, int kind, int shift, int ebig);
    int k;
    case (kind)
      1, 4: return 3;
      2:    return (m == 0) ? 2 : 1;
      default: begin
        if (m < 2 || ebig < 4) return 2;
        k = m - 2;
        if (shift <= k) return 1;
        if (shift >= k + 2) return 2;
        return 0;
      end
    endcase
  endfunction

  initial begin
    logic [63:0] a, b;
    logic        sub;
    int          cyc, win;
    for (int m = 0; m < NM; m++) begin n_coll1[m] = 0; n_coll2[m] = 0; n_one[m] = 0; end
    rst_n = 1'b0; in_valid = 1'b0; in_a = '0; in_b = '0; in_sub = 1'b0;
    in_rm = RM_RNE; in_tag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < MAXC; cyc++) begin
      iv[cyc] = ($urandom_range(0, 15) != 0) && (cyc < MAXC - 8);
      if (iv[cyc]) begin
        gen(a, b, sub);
        in_rm = rmode_e'($urandom_range(0, 3));
        ia[cyc] = a; ib[cyc] = b;
        iexp[cyc]  = ref_add(a, b, sub, in_rm);
        ikind[cyc] = classify(a, b, sub, ishift[cyc], iebig[cyc]);
        for (int m = 0; m < NM; m++) begin
          inat[m][cyc]  = natural_latency(m, ikind[cyc], ishift[cyc], iebig[cyc]);
          idone[m][cyc] = 1'b0;
        end
        in_valid = 1'b1; in_a = a; in_b = b; in_sub = sub; in_tag = 6'(cyc);
      end else begin
        in_valid = 1'b0;
        in_a = {$urandom(), $urandom()}; in_b = {$urandom(), $urandom()};
      end
      #4;
      for (int m = 0; m < NM; m++) begin
        if (iv[cyc]) begin
          checks++;
          if (inat[m][cyc] == 0) inat[m][cyc] = pred_one_cycle[m] ? 1 : 2;
          else if (pred_one_cycle[m] != (inat[m][cyc] == 1))
            fail($sformatf("mode %0d: pred_one_cycle=%0d, expected latency %0d for %h %h",
                           m, pred_one_cycle[m], inat[m][cyc], ia[cyc], ib[cyc]));
          if (inat[m][cyc] == 1) n_one[m]++;
        end
        win = -1;
        for (int k = 2; k >= 0; k--) begin
          int c;
          c = cyc - k;
          if (win < 0 && c >= 0 && iv[c] && !idone[m][c] && inat[m][c] <= k + 1) win = c;
        end
        checks++;
        if (win < 0) begin
          if (res_valid[m]) fail($sformatf("mode %0d cycle %0d: unexpected result", m, cyc));
        end else begin
          idone[m][win] = 1'b1;
          iret[m][win]  = cyc;
          if (cyc - win + 1 > inat[m][win]) begin
            if (inat[m][win] == 1) n_coll1[m]++; else n_coll2[m]++;
          end
          if (!res_valid[m] || res_tag[m] != 6'(win) || int'(res_stage[m]) != cyc - win + 1)
            fail($sformatf("mode %0d cycle %0d: expected tag %0d stage %0d, got valid=%0d tag %0d stage %0d",
                           m, cyc, 6'(win), cyc - win + 1, res_valid[m], res_tag[m], res_stage[m]));
          else begin
            checks++;
            if (res_value[m] !== iexp[win])
              fail($sformatf("mode %0d: %h, %h: got %h expected %h", m, ia[win], ib[win], res_value[m], iexp[win]));
          end
        end
        if (cyc >= 1 && iv[cyc-1] && !(idone[m][cyc-1] && iret[m][cyc-1] == cyc - 1)) begin
          int expc;
          checks++;
          expc = (idone[m][cyc-1] && iret[m][cyc-1] == cyc) ? 1 : 2;
          if (!sched_valid[m] || sched_tag[m] != 6'(cyc - 1) || int'(sched_cycles[m]) != expc)
            fail($sformatf("mode %0d cycle %0d: sched valid=%0d cycles=%0d, expected %0d",
                           m, cyc, sched_valid[m], sched_cycles[m], expc));
        end else if (sched_valid[m]) fail($sformatf("mode %0d cycle %0d: spurious sched_valid", m, cyc));
      end
      @(negedge clk);
    end
    for (int m = 0; m < NM; m++) begin
      for (int c = 0; c < MAXC; c++)
        if (iv[c] && !idone[m][c]) fail($sformatf("mode %0d: operation of cycle %0d never retired", m, c));
      $display("mode %0d: one-cycle operations %0d, collisions stage1->2 %0d, stage2->3 %0d",
               m, n_one[m], n_coll1[m], n_coll2[m]);
      if (n_coll2[m] == 0 || (m > 0 && (n_coll1[m] == 0 || n_one[m] == 0)))
        fail($sformatf("mode %0d: a collision or early completion never happened", m));
    end
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
