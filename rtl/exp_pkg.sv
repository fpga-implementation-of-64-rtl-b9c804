// exp_pkg: widths, constants and elaboration-time helper functions shared by
// the double-precision exp() pipeline.
//
// Number formats used through the pipeline:
//   * |x| after the barrel shifter: 64-bit unsigned fixed point, 10 integer
//     bits and 54 fraction bits (FIX_INT.FIX_FRAC).
//   * reduced argument x_F: 60-bit fraction in [0,1), weights 2^-1 .. 2^-60,
//     split into x_M (9 bits), x_D (9 bits), x_L (9 bits) and the Taylor part
//     x_T (33 bits), as the design splits it.
//   * mantissa datapath after the LUTs: fixed point with FW fraction bits,
//     FW = 53 + GUARD_BITS (52 stored mantissa bits, one rounding bit and the
//     guard bits that bound the truncation error of the reduced-width
//     multipliers).
// The two constant multipliers use ln(2) and log2(e) truncated (rounded
// down), so that the integer estimate never exceeds the true floor and the
// reduced argument never goes negative.
// The section widths, the 11-bit integer part and the 64-bit fixed-point
// image follow the design; the other widths and constants are this
// implementation's choices.
package exp_pkg;

  // Default number of guard bits (the design settles on 4).
  localparam int unsigned GUARD_BITS_DEF = 4;

  // Fixed-point image of |x|.
  localparam int unsigned FIX_INT  = 10;
  localparam int unsigned FIX_FRAC = 54;
  localparam int unsigned FIX_W    = FIX_INT + FIX_FRAC;   // 64

  // Integer part of x*log2(e): 11-bit magnitude plus a separate sign.
  localparam int unsigned INT_W = 11;

  // Reduced argument and its sections.
  localparam int unsigned XF_W   = 60;
  localparam int unsigned LUT_AW = 9;
  localparam int unsigned XT_W   = XF_W - 3 * LUT_AW;      // 33

  // log2(e) for the low-precision estimate of the integer part:
  // floor(log2(e) * 2^16) = 94548; |x| enters with 8 fraction bits.
  localparam int unsigned LOG2E_FRAC = 16;
  localparam logic [16:0] LOG2E_Q    = 17'd94548;
  localparam int unsigned XQ_FRAC    = 8;

  // ln(2) with 72 fraction bits, floor(ln(2) * 2^72).
  localparam int unsigned LN2_FRAC = 72;
  localparam logic [71:0] LN2_Q    = 72'hB1_7217_F7D1_CF79_ABC9;

  // Special-value classes carried beside the datapath.
  typedef enum logic [1:0] {
    SPC_NONE = 2'd0,   // ordinary result from the datapath
    SPC_NAN  = 2'd1,   // quiet NaN
    SPC_INF  = 2'd2,   // +infinity (overflow or x = +inf)
    SPC_ZERO = 2'd3    // +0 (underflow or x = -inf)
  } special_e;

  // Canonic signed digit recoding of an unsigned constant of w bits.
  // Returns {neg, pos}: pos marks the +1 digits and neg the -1 digits; no
  // two non-zero digits are adjacent. There is one digit more than in c.
  function automatic logic [257:0] csd_digits(input logic [127:0] c, input int unsigned w);
    logic [128:0] pos;
    logic [128:0] neg;
    logic [129:0] v;
    pos = '0;
    neg = '0;
    v   = {2'b00, c};
    for (int unsigned i = 0; i <= w; i++) begin
      if (v[0]) begin
        if (v[1]) begin          // ...11 : digit -1, carry upward
          neg[i] = 1'b1;
          v      = v + 130'd1;
        end else begin           // ...01 : digit +1
          pos[i] = 1'b1;
          v      = v - 130'd1;
        end
      end
      v = v >> 1;
    end
    return {neg, pos};
  endfunction

  // round(exp(k * 2^-shift) * 2^fw), optionally minus 2^fw, for k < 2^10,
  // shift >= 9 and fw <= 96. Evaluated with the Taylor series in 128-bit
  // fixed point (100 fraction bits); the argument is at most 1, so 40 terms
  // take the series far below the output resolution.
  function automatic logic [127:0] exp_fixed(input int unsigned k, input int unsigned shift,
                                             input int unsigned fw, input bit minus_one);
    localparam int unsigned P = 100;
    logic [127:0] term;
    logic [127:0] sum;
    term = 128'd1 << P;
    sum  = term;
    for (int unsigned n = 1; n <= 40; n++) begin
      term = ((term * 128'(k)) >> shift) / 128'(n);
      sum  = sum + term;
    end
    sum = (sum + (128'd1 << (P - fw - 1))) >> (P - fw);
    if (minus_one) sum = sum - (128'd1 << fw);
    return sum;
  endfunction

endpackage
