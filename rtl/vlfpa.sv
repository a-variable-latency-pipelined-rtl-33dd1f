// vlfpa: variable latency pipelined double precision floating-point adder.
//
// A two-path (CLOSE/FAR) adder with combined rounding, pipelined in three
// stages, in which an operation leaves the pipeline as soon as its result is
// known: FAR path operations (exponent difference above one) take three
// cycles, CLOSE path operations take two, and with LAT_MODE above
// LAT_TWO_CYCLE the common CLOSE path cases finish in the first cycle
// (effective additions; with LAT_SUBSk also effective subtractions whose
// predicted normalizing shift is at most k bits). A new operation can enter
// every cycle.
//
// Stage 1: operand unpacking; FAR path exponent subtraction and swap
//          (fpa_exp_diff); the whole first part of the CLOSE path (swap and
//          one-place alignment from the low exponent bits, compound add,
//          leading-one prediction, short shift and rounding: fpa_close_path);
//          early one-cycle prediction (fpa_onecycle_pred); Inf/NaN
//          (fpa_special).
// Stage 2: FAR path alignment shift (fpa_align_shift); CLOSE path full
//          normalizing shift (fpa_norm_shift).
// Stage 3: FAR path add, one-place normalization and rounding (fpa_far_add).
// Any stage may drive the result bus; fpa_bus_ctrl lets the oldest finished
// operation drive it and pipes a younger finished result into the next
// stage, so no operation waits past the third cycle.
//
// Interface and timing. An operation is presented on in_* with in_valid for
// one cycle (there is no stall: one may be presented every cycle); in_sub
// selects a - b instead of a + b and in_tag is returned with the result.
// The result bus (res_*) is combinational from the stage that finishes; an
// operation presented in cycle t appears in cycle t + L - 1, where
// L = res_stage is its latency of 1, 2 or 3 cycles, and is sampled at the
// clock edge ending that cycle. pred_one_cycle is the early signal, in the
// cycle the operation is presented, that it completes in that cycle. In the
// next cycle sched_valid/sched_tag/sched_cycles say, for the operation now in
// stage 2, how many more cycles (1 or 2) until its result is on the bus,
// collisions included. Reset is active low and synchronous; it empties the
// pipeline.
//
// The stage split, the early completion rules, the prediction and the
// collision rule follow the published variable latency adder; the
// interface (tags, the scheduler signals as ports, a mux for the tri-state
// bus), Inf/NaN and subnormal handling and the rounding details are this
// design's choices.
module vlfpa
  import fpa_pkg::*;
#(
  parameter lat_mode_e LAT_MODE = LAT_SUBS2,
  parameter int        TAG_W    = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      in_a,
  input  logic [63:0]      in_b,
  input  logic             in_sub,
  input  rmode_e           in_rm,
  input  logic [TAG_W-1:0] in_tag,
  output logic             pred_one_cycle,
  output logic             sched_valid,
  output logic [TAG_W-1:0] sched_tag,
  output logic [1:0]       sched_cycles,
  output logic             res_valid,
  output logic [TAG_W-1:0] res_tag,
  output logic [63:0]      res_value,
  output logic [1:0]       res_stage
);

  // ------------------------------------------------------------ stage 1
  fp_unpacked_t ua, ub;
  logic [EXP_W-1:0] far_d, far_e_big;
  logic             far_b_big;
  logic             eff_sub, close, one_cycle, special;
  logic [5:0]       lop_lz;
  logic [3:0]       x_top, y_top;
  logic [63:0]      close_res, special_res;
  logic [53:0]      close_mag;
  logic             close_sign;
  logic [EXP_W-1:0] close_e_big;
  stage2_t          s1_next;

  always_comb begin
    ua = fp_unpack(in_a);
    ub = fp_unpack(in_b);
    ub.sign = ub.sign ^ in_sub;
  end

  fpa_exp_diff u_exp_diff (
    .ea(ua.exp), .eb(ub.exp), .d(far_d), .b_big(far_b_big), .e_big(far_e_big)
  );

  fpa_close_path u_close (
    .a(ua), .b(ub), .rm(in_rm), .eff_sub(eff_sub), .lop_lz(lop_lz),
    .x_top(x_top), .y_top(y_top),
    .result(close_res), .mag(close_mag), .mag_sign(close_sign), .e_big(close_e_big)
  );

  fpa_special u_special (
    .a_raw(in_a), .b_raw(in_b), .a(ua), .b(ub), .special(special), .result(special_res)
  );

  fpa_onecycle_pred #(.LAT_MODE(LAT_MODE)) u_pred (
    .ea(ua.exp), .eb(ub.exp), .eff_sub(eff_sub), .special(special),
    .x_top(x_top), .y_top(y_top), .close(close), .one_cycle(one_cycle)
  );

  assign pred_one_cycle = in_valid & one_cycle;

  always_comb begin
    s1_next         = '0;
    s1_next.rm      = in_rm;
    s1_next.eff_sub = eff_sub;
    if (special) begin
      s1_next.kind = K_SPECIAL;
      s1_next.res  = special_res;
    end else if (close) begin
      s1_next.kind   = (one_cycle || !eff_sub) ? K_DONE : K_CLOSE;
      s1_next.res    = close_res;
      s1_next.mag    = close_mag;
      s1_next.lop_lz = lop_lz;
      s1_next.e_big  = close_e_big;
      s1_next.sign   = close_sign;
    end else begin
      s1_next.kind  = K_FAR;
      s1_next.x     = far_b_big ? ub.sig : ua.sig;
      s1_next.y     = far_b_big ? ua.sig : ub.sig;
      s1_next.d     = far_d;
      s1_next.e_big = far_e_big;
      s1_next.sign  = far_b_big ? ub.sign : ua.sign;
    end
  end

  // ------------------------------------------------------------ stage 2
  logic             s2_valid;
  logic [TAG_W-1:0] s2_tag;
  stage2_t          s2;
  logic [63:0]      norm_res;
  logic [SIG_W+2:0] aligned;
  stage3_t          s2_next;

  fpa_norm_shift u_norm (
    .mag(s2.mag), .sign(s2.sign), .e_big(s2.e_big), .lop_lz(s2.lop_lz),
    .rm(s2.rm), .result(norm_res)
  );

  fpa_align_shift u_align (.sig(s2.y), .d(s2.d), .aligned(aligned));

  always_comb begin
    s2_next         = '0;
    s2_next.kind    = (s2.kind == K_FAR) ? K_FAR : K_DONE;
    s2_next.res     = (s2.kind == K_CLOSE) ? norm_res : s2.res;
    s2_next.x       = s2.x;
    s2_next.y       = aligned;
    s2_next.e_big   = s2.e_big;
    s2_next.sign    = s2.sign;
    s2_next.eff_sub = s2.eff_sub;
    s2_next.rm      = s2.rm;
  end

  // ------------------------------------------------------------ stage 3
  logic             s3_valid;
  logic [TAG_W-1:0] s3_tag;
  stage3_t          s3;
  logic [63:0]      far_res;

  fpa_far_add u_far (
    .x(s3.x), .y(s3.y), .e_big(s3.e_big), .sign(s3.sign), .eff_sub(s3.eff_sub),
    .rm(s3.rm), .result(far_res)
  );

  // ------------------------------------------------------------ result bus
  logic fin1, fin2, fin3, drv1, drv2, drv3, pipe1, pipe2;

  assign fin1 = in_valid & one_cycle;
  assign fin2 = s2_valid & ((s2.kind == K_DONE) || (s2.kind == K_CLOSE));
  assign fin3 = s3_valid;

  fpa_bus_ctrl u_bus (
    .fin1(fin1), .fin2(fin2), .fin3(fin3),
    .drv1(drv1), .drv2(drv2), .drv3(drv3), .pipe1(pipe1), .pipe2(pipe2)
  );

  always_comb begin
    res_valid = drv1 | drv2 | drv3;
    res_tag   = '0;
    res_value = '0;
    res_stage = 2'd0;
    if (drv3) begin
      res_tag   = s3_tag;
      res_value = (s3.kind == K_FAR) ? far_res : s3.res;
      res_stage = 2'd3;
    end else if (drv2) begin
      res_tag   = s2_tag;
      res_value = s2_next.res;
      res_stage = 2'd2;
    end else if (drv1) begin
      res_tag   = in_tag;
      res_value = close_res;
      res_stage = 2'd1;
    end
  end

  // scheduler notice for the operation in stage 2
  assign sched_valid  = s2_valid;
  assign sched_tag    = s2_tag;
  assign sched_cycles = drv2 ? 2'd1 : 2'd2;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s3_valid <= 1'b0;
      s2_tag   <= '0;
      s3_tag   <= '0;
      s2       <= '0;
      s3       <= '0;
    end else begin
      s2_valid <= in_valid & ~drv1;
      s2_tag   <= in_tag;
      s2       <= s1_next;
      s3_valid <= s2_valid & ~drv2;
      s3_tag   <= s2_tag;
      s3       <= s2_next;
    end
  end

  // an operation never leaves stage 3 unfinished
  always_ff @(posedge clk)
    if (rst_n) assert (!(s3_valid && !drv3)) else $error("vlfpa: stage 3 result lost");

  // pipe1/pipe2 are implied by the valid updates above
  logic unused_pipe;
  assign unused_pipe = pipe1 ^ pipe2;

endmodule
