// fp_unpack_shift: input stage of the exp() pipeline.
//
// Splits an IEEE-754 double into sign, exponent and mantissa, detects the
// exceptional inputs and turns |x| into a 64-bit unsigned fixed-point number
// (10 integer bits, 54 fraction bits) with a barrel shifter whose shift
// amount comes from the exponent field.
//
// Exceptional inputs are classified for the output stage:
//   NaN -> NaN, +inf -> +inf, -inf -> +0,
//   |x| >= 1024 (biased exponent >= 1033) -> +inf for x > 0, +0 for x < 0,
// since exp() of such an argument is outside the double range. Zero and
// subnormal inputs become a fixed-point zero (exp gives 1.0). Mantissa bits
// below 2^-54 are dropped.
//
// Interface: one input per cycle (in_valid), result registered, latency 1.
// The split into a detection part and a barrel shifter follows the design;
// the fixed-point format (10.54) and the range limit are this
// implementation's choice.
module fp_unpack_shift
  import exp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [63:0]          x,
  output logic                 out_valid,
  output logic [FIX_W-1:0]     mag,       // |x|, FIX_INT.FIX_FRAC
  output logic                 neg,       // sign of x
  output special_e             special
);

  // Biased exponent at which the mantissa's hidden bit lands on bit 52 of
  // the fixed-point word (2^0 sits at bit FIX_FRAC).
  localparam int unsigned E_ALIGN = 1023 - (FIX_FRAC - 52);   // 1021
  localparam int unsigned E_LIMIT = 1023 + FIX_INT;           // 1033: |x| >= 2^10

  logic        s;
  logic [10:0] e;
  logic [51:0] f;
  logic [FIX_W-1:0] m_ext;
  logic [FIX_W-1:0] shifted;
  special_e         spc;

  assign s = x[63];
  assign e = x[62:52];
  assign f = x[51:0];

  always_comb begin
    m_ext = (e == 11'd0) ? '0 : FIX_W'({1'b1, f});
    if (32'(e) >= E_ALIGN) shifted = m_ext << (32'(e) - E_ALIGN);
    else if (E_ALIGN - 32'(e) >= 32'(FIX_W)) shifted = '0;
    else shifted = m_ext >> (E_ALIGN - 32'(e));

    if (e == 11'h7FF) spc = (f != '0) ? SPC_NAN : (s ? SPC_ZERO : SPC_INF);
    else if (32'(e) >= E_LIMIT) spc = s ? SPC_ZERO : SPC_INF;
    else spc = SPC_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
      neg       <= 1'b0;
      special   <= SPC_NONE;
    end else begin
      out_valid <= in_valid;
      mag       <= (spc == SPC_NONE) ? shifted : '0;
      neg       <= s;
      special   <= spc;
    end
  end

endmodule
