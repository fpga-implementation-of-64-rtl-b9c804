// sign_logic: sign migration of the reduced argument.
//
// The range reduction works on |x|: q estimates floor(|x|*log2(e)) and
// r = |x| - q*ln2 lies in [0,1) (q may be one below the true floor, in which
// case r can exceed ln2). For a negative argument the sign is moved entirely
// into the integer part so that the tables only see non-negative addresses.
// Counting the integer part in units of ln2 (the reduced argument is in
// natural units), -q*ln2 - r = -(q+1)*ln2 + (ln2 - r):
//   x >= 0                 : int = +q,      xf = r
//   x <  0, r == 0         : int = -q,      xf = 0
//   x <  0, 0 < r <= ln2   : int = -(q+1),  xf = ln2 - r
//   x <  0, r > ln2        : int = -(q+2),  xf = 2*ln2 - r
// The last line covers the low-precision integer estimate. The fraction
// step is a two's-complement negation of r plus the constant ln2.
// The integer part is an 11-bit magnitude with a separate sign.
//
// Interface: combinational. migrated flags the negative cases with r != 0
// and wrapped the last case (both for statistics and tests).
module sign_logic
  import exp_pkg::*;
(
  input  logic              neg,
  input  logic [INT_W-1:0]  q,
  input  logic [XF_W-1:0]   r,
  output logic [INT_W-1:0]  int_mag,
  output logic              int_neg,
  output logic [XF_W-1:0]   xf,
  output logic              migrated,
  output logic              wrapped
);
  // ln(2) with XF_W fraction bits, rounded down.
  localparam logic [XF_W-1:0] LN2_XF = LN2_Q[LN2_FRAC-1 -: XF_W];

  logic signed [XF_W+1:0] t;

  always_comb begin
    t        = $signed({2'b00, LN2_XF}) - $signed({2'b00, r});
    migrated = neg && (r != '0);
    wrapped  = migrated && t[XF_W+1];
    int_neg  = neg;
    if (!migrated) begin
      int_mag = q;
      xf      = r;
    end else if (!wrapped) begin
      int_mag = q + INT_W'(1);
      xf      = t[XF_W-1:0];
    end else begin
      int_mag = q + INT_W'(2);
      xf      = t[XF_W-1:0] + LN2_XF;
    end
  end
endmodule
