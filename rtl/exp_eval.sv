// exp_eval: exponent evaluation (range reduction) of the exp() pipeline.
//
// Splits |x| into an integer part q (the future exponent) and a reduced
// argument so that exp(x) = 2^int * exp(xf), xf in [0,1):
//   stage 1: q = floor(|x| * log2(e)), estimated with a low-precision
//            constant multiplier (|x| with 8 fraction bits, log2(e) with 16,
//            both rounded down). The estimate is the true floor or one
//            below it; the error (< 0.03) is far inside the range that the
//            rest of the circuit tolerates (r must stay below 1, i.e. the
//            estimate may be off by up to (1-ln2)/ln2 = 0.44).
//   stage 2: q * ln(2) with a 72-fraction-bit constant; a reduced-width
//            multiplier builds only the columns down to 2^-64 and rounds
//            down, and the product is kept to 60 bits.
//   stage 3: r = |x| - q*ln(2) (60 fraction bits, 0 <= r < 1), then the
//            sign migration (sign_logic) that makes the fraction
//            non-negative for negative x.
// Both constant multipliers are CSD shift-and-add circuits.
//
// Interface: one operation per cycle, no stalls; latency 3 cycles. The
// special-value class travels with the data. r_above_ln2 reports that the
// integer estimate was one low (the circuit's self-correction range is in
// use); migrated and wrapped come from sign_logic.
// The two-multiplier structure, the low-precision first multiplier and the
// sign migration follow the design; the constant widths are this
// implementation's choice.
module exp_eval
  import exp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [FIX_W-1:0]   mag,
  input  logic               neg,
  input  special_e           special_in,
  output logic               out_valid,
  output logic [INT_W-1:0]   int_mag,
  output logic               int_neg,
  output logic [XF_W-1:0]    xf,
  output special_e           special_out,
  output logic               r_above_ln2,
  output logic               migrated,
  output logic               wrapped
);
  localparam int unsigned AQ_W  = FIX_INT + XQ_FRAC;              // 18
  localparam int unsigned P1_W  = AQ_W + LOG2E_FRAC + 1;          // 35
  // The q*ln2 multiplier builds only 4 columns below the 60 kept bits.
  localparam int unsigned P2_DROP = LN2_FRAC - XF_W - 4;           // 8
  localparam int unsigned P2_W  = INT_W + LN2_FRAC - P2_DROP;      // 75
  localparam int unsigned R_W   = FIX_INT + 1 + XF_W;             // 71
  localparam logic [XF_W-1:0] LN2_XF = LN2_Q[LN2_FRAC-1 -: XF_W];

  // ---------------- stage 1: integer estimate ----------------
  logic [AQ_W-1:0] aq;
  logic [P1_W-1:0] p1;
  assign aq = mag[FIX_W-1 -: AQ_W];

  csd_const_mult #(.IN_W(AQ_W), .C_W(LOG2E_FRAC + 1), .CONST(LOG2E_Q)) u_mul_log2e (
    .a(aq), .p(p1)
  );

  logic             s1_valid, s1_neg;
  logic [FIX_W-1:0] s1_mag;
  logic [INT_W-1:0] s1_q;
  special_e         s1_spc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_neg <= 1'b0; s1_mag <= '0; s1_q <= '0; s1_spc <= SPC_NONE;
    end else begin
      s1_valid <= in_valid;
      s1_neg   <= neg;
      s1_mag   <= mag;
      s1_q     <= p1[XQ_FRAC + LOG2E_FRAC +: INT_W];
      s1_spc   <= special_in;
    end
  end

  // ---------------- stage 2: q * ln(2) ----------------
  logic [P2_W-1:0] p2;

  csd_const_mult #(.IN_W(INT_W), .C_W(LN2_FRAC), .CONST(LN2_Q), .DROP(P2_DROP)) u_mul_ln2 (
    .a(s1_q), .p(p2)
  );

  logic             s2_valid, s2_neg;
  logic [FIX_W-1:0] s2_mag;
  logic [INT_W-1:0] s2_q;
  logic [R_W-1:0]   s2_qln2;       // 11 integer bits, 60 fraction bits
  special_e         s2_spc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_neg <= 1'b0; s2_mag <= '0; s2_q <= '0; s2_qln2 <= '0;
      s2_spc <= SPC_NONE;
    end else begin
      s2_valid <= s1_valid;
      s2_neg   <= s1_neg;
      s2_mag   <= s1_mag;
      s2_q     <= s1_q;
      s2_qln2  <= p2[P2_W-1 : LN2_FRAC - XF_W - P2_DROP];
      s2_spc   <= s1_spc;
    end
  end

  // ---------------- stage 3: subtract and sign migration ----------------
  logic [R_W-1:0]  diff;
  logic [XF_W-1:0] r;
  logic [INT_W-1:0] sl_mag;
  logic             sl_neg, sl_mig, sl_wrap;
  logic [XF_W-1:0]  sl_xf;

  // |x| is aligned to 60 fraction bits; q*ln2 (rounded down) <= |x| by
  // construction, so the difference is non-negative and below 1.
  assign diff = {1'b0, s2_mag, (XF_W - FIX_FRAC)'(0)} - s2_qln2;
  assign r    = diff[XF_W-1:0];

  sign_logic u_sign (
    .neg(s2_neg), .q(s2_q), .r(r),
    .int_mag(sl_mag), .int_neg(sl_neg), .xf(sl_xf), .migrated(sl_mig), .wrapped(sl_wrap)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; int_mag <= '0; int_neg <= 1'b0; xf <= '0;
      special_out <= SPC_NONE; r_above_ln2 <= 1'b0; migrated <= 1'b0; wrapped <= 1'b0;
    end else begin
      out_valid   <= s2_valid;
      int_mag     <= sl_mag;
      int_neg     <= sl_neg;
      xf          <= sl_xf;
      special_out <= s2_spc;
      r_above_ln2 <= (r > LN2_XF);
      migrated    <= sl_mig;
      wrapped     <= sl_wrap;
    end
  end

endmodule
