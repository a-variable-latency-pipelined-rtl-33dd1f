// fpa_pkg: types and constants shared by the variable latency double
// precision adder. Operands are IEEE 754 binary64 words (1 sign bit, 11-bit
// biased exponent, 52-bit fraction with a hidden bit). Inside the adder an
// operand is carried "unpacked": its exponent is the biased exponent with a
// subnormal's 0 read as 1, and its significand is 53 bits with the hidden bit
// made explicit (0 for zeros and subnormals), so that the datapath needs no
// special case for subnormal inputs.
package fpa_pkg;

  localparam int EXP_W  = 11;             // biased exponent bits
  localparam int FRAC_W = 52;             // stored fraction bits
  localparam int SIG_W  = FRAC_W + 1;     // significand with hidden bit
  localparam logic [EXP_W-1:0] EXP_MAX = '1; // exponent of Inf and NaN

  // Default quiet NaN returned for an invalid operation (Inf - Inf).
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  // IEEE rounding modes. RNE is the default mode.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // to nearest, ties to even
    RM_RTZ = 2'd1,   // towards zero
    RM_RUP = 2'd2,   // towards +Inf
    RM_RDN = 2'd3    // towards -Inf
  } rmode_e;

  // Which operations may complete early. LAT_TWO_CYCLE: every CLOSE path
  // operation takes two cycles. LAT_ADDS: CLOSE path effective additions take
  // one. LAT_SUBSk: in addition, CLOSE path effective subtractions whose
  // normalizing left shift is predicted to be at most k bits take one.
  typedef enum logic [2:0] {
    LAT_TWO_CYCLE = 3'd0,
    LAT_ADDS      = 3'd1,
    LAT_SUBS0     = 3'd2,
    LAT_SUBS1     = 3'd3,
    LAT_SUBS2     = 3'd4
  } lat_mode_e;

  // What a pipeline slot holds.
  typedef enum logic [1:0] {
    K_DONE    = 2'd0,   // a finished result waiting for the bus
    K_CLOSE   = 2'd1,   // CLOSE path subtraction awaiting normalization
    K_FAR     = 2'd2,   // FAR path operation in progress
    K_SPECIAL = 2'd3    // Inf/NaN result, released in the third cycle
  } slot_kind_e;

  // Second-stage pipeline register.
  typedef struct packed {
    slot_kind_e       kind;
    logic [63:0]      res;       // K_DONE, K_SPECIAL
    logic [53:0]      mag;       // K_CLOSE: unnormalized magnitude
    logic [5:0]       lop_lz;    // K_CLOSE: predicted shift
    logic [SIG_W-1:0] x;         // K_FAR: larger significand
    logic [SIG_W-1:0] y;         // K_FAR: smaller significand
    logic [EXP_W-1:0] d;         // K_FAR: exponent difference
    logic [EXP_W-1:0] e_big;
    logic             sign;
    logic             eff_sub;
    rmode_e           rm;
  } stage2_t;

  // Third-stage pipeline register.
  typedef struct packed {
    slot_kind_e       kind;      // K_DONE or K_FAR
    logic [63:0]      res;
    logic [SIG_W-1:0] x;
    logic [SIG_W+2:0] y;         // aligned, with guard, round, sticky
    logic [EXP_W-1:0] e_big;
    logic             sign;
    logic             eff_sub;
    rmode_e           rm;
  } stage3_t;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;    // biased, subnormal/zero read as 1
    logic [SIG_W-1:0] sig;    // hidden bit explicit
    logic             is_inf;
    logic             is_nan;
  } fp_unpacked_t;

  // Unpack one binary64 word.
  function automatic fp_unpacked_t fp_unpack(input logic [63:0] w);
    fp_unpacked_t u;
    logic [EXP_W-1:0] e;
    e        = w[62:52];
    u.sign   = w[63];
    u.exp    = (e == '0) ? EXP_W'(1) : e;
    u.sig    = {(e != '0), w[51:0]};
    u.is_inf = (e == EXP_MAX) && (w[51:0] == '0);
    u.is_nan = (e == EXP_MAX) && (w[51:0] != '0);
    return u;
  endfunction

  // Round-up decision from the rounding bits (sign, LSB, guard, sticky).
  function automatic logic round_up(rmode_e rm, logic sign, logic lsb,
                                    logic guard, logic sticky);
    unique case (rm)
      RM_RNE:  return guard & (sticky | lsb);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return ~sign & (guard | sticky);
      default: return  sign & (guard | sticky);
    endcase
  endfunction

  // Result of an exponent overflow: Inf, or the largest finite number when
  // the mode rounds towards zero for this sign.
  function automatic logic [63:0] overflow_result(rmode_e rm, logic sign);
    if (rm == RM_RTZ || (rm == RM_RUP && sign) || (rm == RM_RDN && !sign))
      return {sign, 11'h7FE, {52{1'b1}}};
    return {sign, 11'h7FF, 52'd0};
  endfunction

endpackage
