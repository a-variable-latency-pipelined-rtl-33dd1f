// tb_vlfpa_workload: average latency of the five latency configurations on
// an operand stream with the published SPECfp92 statistics of double
// precision additions: 57% FAR path (exponent difference above one), 20%
// CLOSE path effective additions and 23% CLOSE path effective subtractions,
// whose normalizing shift is 0, 1 or 2 bits in 4.4%, 22.4% and 25.7% of
// cases (the remaining 47.5% are drawn here from 3..10 bits). Operations are
// issued four cycles apart so that no two collide on the result bus, as in
// the published figures. Five adders (LAT_TWO_CYCLE, LAT_ADDS, LAT_SUBS0,
// LAT_SUBS1, LAT_SUBS2) see the same stream; every result is checked against
// the reference model and each measured average latency against the value
// the statistics give (2.57, 2.37, 2.36, 2.31 and 2.25 cycles). Because the
// leading-one prediction may be one place short, a three-bit shift sometimes
// completes early, so the subsN averages may come out slightly lower.
// A second phase issues back-to-back operations that alternate between the
// CLOSE and FAR paths (FAR, FAR, CLOSE, ...), the worst case for bus
// collisions, and checks that
// every result still arrives, correct and within three cycles, and that one
// result retires every cycle.
module tb_vlfpa_workload;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int NOPS = 20000;
  localparam int NM   = 5;
  localparam int NALT = 2000;

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
  int lat_sum [NM];
  int n_res   [NM];

  function automatic int lz54(logic [53:0] v);
    for (int i = 53; i >= 0; i--) if (v[i]) return 53 - i;
    return 54;
  endfunction

  // CLOSE path subtraction whose normalizing shift is exactly `want`
  task automatic close_sub(int want, output logic [63:0] a, output logic [63:0] b);
    int e, d, k;
    logic [53:0] x, y;
    logic [51:0] f;
    for (int tries = 0; tries < 100000; tries++) begin
      e = $urandom_range(100, 1900);
      d = $urandom_range(0, 1);
      a = {$urandom_range(0, 1) != 0, 11'(e), 52'({$urandom(), $urandom()})};
      f = 52'({$urandom(), $urandom()});
      k = $urandom_range(0, 12);
      // share the top k fraction bits to cancel about k places
      if (k > 0) f = (a[51:0] & ~(52'hF_FFFF_FFFF_FFFF >> k)) | (f & (52'hF_FFFF_FFFF_FFFF >> k));
      b = {~a[63], 11'(e - d), f};
      x = {1'b1, a[51:0], 1'b0};
      y = d ? {2'b01, b[51:0]} : {1'b1, b[51:0], 1'b0};
      if (lz54((x >= y) ? x - y : y - x) == want) return;
    end
    $display("could not build a shift of %0d", want);
  endtask

  initial begin
    logic [63:0] a, b, ev;
    int r, sh, lat;
    real avg, paper [NM];
    paper = '{2.57, 2.37, 2.36, 2.31, 2.25};
    for (int m = 0; m < NM; m++) begin lat_sum[m] = 0; n_res[m] = 0; end
    rst_n = 1'b0; in_valid = 1'b0; in_a = '0; in_b = '0; in_sub = 1'b0; in_rm = RM_RNE; in_tag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      r = $urandom_range(0, 9999);
      if (r < 5700) begin                       // FAR path
        int e;
        e = $urandom_range(100, 1900);
        a = {$urandom_range(0, 1) != 0, 11'(e), 52'({$urandom(), $urandom()})};
        b = {$urandom_range(0, 1) != 0, 11'(e - $urandom_range(2, 60)), 52'({$urandom(), $urandom()})};
      end else if (r < 7700) begin              // CLOSE effective addition
        int e;
        e = $urandom_range(100, 1900);
        a = {$urandom_range(0, 1) != 0, 11'(e), 52'({$urandom(), $urandom()})};
        b = {a[63], 11'(e - $urandom_range(0, 1)), 52'({$urandom(), $urandom()})};
      end else begin                            // CLOSE effective subtraction
        r = $urandom_range(0, 999);
        sh = (r < 44) ? 0 : (r < 268) ? 1 : (r < 525) ? 2 : $urandom_range(3, 10);
        close_sub(sh, a, b);
      end
      if ($urandom_range(0, 1)) begin logic [63:0] t; t = a; a = b; b = t; end
      in_valid = 1'b1; in_a = a; in_b = b; in_sub = 1'b0; in_tag = 6'(n);
      in_rm = rmode_e'($urandom_range(0, 3));
      ev = ref_add(a, b, 1'b0, in_rm);
      for (int c = 1; c <= 4; c++) begin
        #4;
        for (int m = 0; m < NM; m++) begin
          if (res_valid[m]) begin
            lat = c;
            checks++;
            n_res[m]++;
            lat_sum[m] += int'(res_stage[m]);
            if (res_value[m] !== ev || res_tag[m] != 6'(n) || int'(res_stage[m]) != lat) begin
              failures++;
              if (failures < 10)
                $display("FAIL mode %0d: %h + %h got %h (stage %0d, cycle %0d) expected %h",
                         m, a, b, res_value[m], res_stage[m], lat, ev);
            end
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    for (int m = 0; m < NM; m++) begin
      checks++;
      avg = real'(lat_sum[m]) / real'(n_res[m]);
      $display("mode %0d: %0d results, average latency %0.3f cycles (published %0.2f), speedup %0.3f",
               m, n_res[m], avg, paper[m], 3.0 / avg);
      if (n_res[m] != NOPS || avg > paper[m] + 0.02 || avg < paper[m] - ((m >= 2) ? 0.06 : 0.02)) begin
        failures++;
        $display("FAIL mode %0d average latency out of range", m);
      end
    end
    // Worst case for collisions: back-to-back operations alternating
    // between the CLOSE and FAR paths, two FAR operations for each CLOSE one,
    // so that every CLOSE result meets a FAR result on the bus whether it
    // finishes in the first or the second cycle. Every result must still be correct,
    // arrive within three cycles with its tag, and the adders must retire
    // one result per cycle once the pipeline is full.
    begin
      logic [63:0] exp_tag [64];
      int          iss_tag [64];
      int          n_issued, n_coll [NM], n_ret [NM], lat_alt [NM];
      n_issued = 0;
      for (int m = 0; m < NM; m++) begin n_coll[m] = 0; n_ret[m] = 0; lat_alt[m] = 0; end
      for (int cyc = 0; cyc < NALT + 4; cyc++) begin
        if (cyc < NALT) begin
          int e;
          e = $urandom_range(100, 1900);
          a = {$urandom_range(0, 1) != 0, 11'(e), 52'({$urandom(), $urandom()})};
          if (cyc % 3 == 2)
            b = {a[63], 11'(e - $urandom_range(0, 1)), 52'({$urandom(), $urandom()})};
          else
            b = {$urandom_range(0, 1) != 0, 11'(e - $urandom_range(2, 60)), 52'({$urandom(), $urandom()})};
          in_valid = 1'b1; in_a = a; in_b = b; in_sub = 1'b0; in_tag = 6'(cyc);
          in_rm = rmode_e'($urandom_range(0, 3));
          exp_tag[cyc % 64] = ref_add(a, b, 1'b0, in_rm);
          iss_tag[cyc % 64] = cyc;
          n_issued++;
        end else in_valid = 1'b0;
        #4;
        for (int m = 0; m < NM; m++) begin
          if (cyc >= 3 && cyc < NALT) begin
            checks++;
            if (!res_valid[m]) begin
              failures++;
              if (failures < 10) $display("FAIL mode %0d: no result in full-rate cycle %0d", m, cyc);
            end
          end
          if (res_valid[m]) begin
            int t, l;
            t = int'(res_tag[m]);
            l = cyc - iss_tag[t] + 1;
            checks++;
            n_ret[m]++;
            lat_alt[m] += l;
            if (l > ((iss_tag[t] % 3 == 2) ? ((m == 0) ? 2 : 1) : 3)) n_coll[m]++;
            if (res_value[m] !== exp_tag[t] || l != int'(res_stage[m]) || l > 3) begin
              failures++;
              if (failures < 10)
                $display("FAIL mode %0d alternating: tag %0d got %h stage %0d (latency %0d) expected %h",
                         m, t, res_value[m], res_stage[m], l, exp_tag[t]);
            end
          end
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      for (int m = 0; m < NM; m++) begin
        checks++;
        $display("mode %0d alternating FAR/FAR/CLOSE: %0d results, %0d delayed by a collision, average latency %0.3f",
                 m, n_ret[m], n_coll[m], real'(lat_alt[m]) / real'(n_ret[m]));
        if (n_ret[m] != n_issued || n_coll[m] == 0) begin
          failures++;
          $display("FAIL mode %0d: %0d of %0d retired, %0d collisions", m, n_ret[m], n_issued, n_coll[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NOPS * 4 + NALT + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
