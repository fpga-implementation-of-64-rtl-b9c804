// exp64: fully pipelined double-precision exp(x) unit.
//
// exp(x) = 2^xI * exp(xf) with xI = floor(x*log2(e)) and xf in [0,1).
// exp(xf) is built from four sections of the 60-bit fraction:
//   exp(xf) = exp(x_M) * exp(x_D) * exp(x_L) * (1 + x_T)
// x_M, x_D and x_L are 9-bit sections (bits 2^-1..2^-27) looked up in three
// 512-entry tables; the remaining 33 bits x_T (< 2^-27) use the first-order
// Taylor term 1 + x_T, whose error x_T^2/2 < 2^-55 is below double
// precision. Negative arguments keep a non-negative fraction by moving the
// sign into the integer part (sign migration).
//
// Pipeline (cycles):
//   1  fp_unpack_shift  special inputs, barrel shift to 10.54 fixed point
//   3  exp_eval         xI estimate (x * 1/ln2), xI * ln2, subtract, sign
//   1  exp_lut x3       table reads
//   S1+1 opt_mult       exp(x_M)*exp(x_D), in parallel with
//        taylor_mult    exp(x_L)*(1+x_T)
//   S3+1 opt_mult       product of the two
//   2  fp_pack          normalise, round, exponent adjust, IEEE-754 word
// Latency is 9 + MUL_STAGES_1 + MUL_STAGES_2 = 27 cycles with the defaults;
// one result per cycle, no stalls (in_valid/out_valid mark the samples).
//
// Datapath fractions after the tables carry FW = 53 + GUARD_BITS bits; the
// multipliers are truncated (reduced width) and the guard bits bound the
// error this causes. With the default of 4 guard bits the result is within
// about one unit in the last place of exp(x); results below the normal range
// are flushed to +0 and results above it give +inf.
//
// Taken from the design: the table/Taylor split, the section widths, the
// two constant multipliers, the sign migration, the optimized and truncated
// multipliers, 4 guard bits and the 27-cycle latency. This implementation's
// own: the fixed-point formats, how the 27 cycles are spread over the
// stages, rounding and special-value handling.
module exp64
  import exp_pkg::*;
#(
  parameter int unsigned GUARD_BITS   = GUARD_BITS_DEF,
  parameter int unsigned MUL_STAGES_1 = 9,
  parameter int unsigned MUL_STAGES_2 = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] y
);
  localparam int unsigned FW      = 53 + GUARD_BITS;
  // Section widths of the table outputs and multiplier operands.
  localparam int unsigned M_W  = FW + 2;     // exp(x_M) < e
  localparam int unsigned D_W  = FW - 9;     // exp(x_D) - 1 < 2^-9
  localparam int unsigned L_W  = FW - 18;    // exp(x_L) - 1 < 2^-18
  localparam int unsigned T_W  = FW - 27;    // x_T < 2^-27
  localparam int unsigned LT_W = FW - 17;    // (1+l)(1+x_T) - 1 < 2^-17
  localparam int unsigned SIDE_DEPTH = 1 + (MUL_STAGES_1 + 1) + (MUL_STAGES_2 + 1);

  initial begin
    assert (GUARD_BITS <= 15) else $error("GUARD_BITS above 15 is not supported");
  end

  // ---------------- input stage ----------------
  logic             u_valid, u_neg;
  logic [FIX_W-1:0] u_mag;
  special_e         u_spc;

  fp_unpack_shift u_unpack (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(u_valid), .mag(u_mag), .neg(u_neg), .special(u_spc)
  );

  // ---------------- exponent evaluation ----------------
  logic             e_valid, e_neg, e_above, e_mig, e_wrap;
  logic [INT_W-1:0] e_mag;
  logic [XF_W-1:0]  e_xf;
  special_e         e_spc;

  exp_eval u_eval (
    .clk(clk), .rst_n(rst_n), .in_valid(u_valid), .mag(u_mag), .neg(u_neg),
    .special_in(u_spc), .out_valid(e_valid), .int_mag(e_mag), .int_neg(e_neg),
    .xf(e_xf), .special_out(e_spc), .r_above_ln2(e_above), .migrated(e_mig),
    .wrapped(e_wrap)
  );

  // ---------------- tables ----------------
  logic [M_W-1:0] lut_m;
  logic [D_W-1:0] lut_d;
  logic [L_W-1:0] lut_l;

  exp_lut #(.SHIFT(9),  .FW(FW), .DATA_W(M_W), .MINUS_ONE(1'b0)) u_lut_m (
    .clk(clk), .addr(e_xf[XF_W-1 -: LUT_AW]), .data(lut_m)
  );
  exp_lut #(.SHIFT(18), .FW(FW), .DATA_W(D_W), .MINUS_ONE(1'b1)) u_lut_d (
    .clk(clk), .addr(e_xf[XF_W-LUT_AW-1 -: LUT_AW]), .data(lut_d)
  );
  exp_lut #(.SHIFT(27), .FW(FW), .DATA_W(L_W), .MINUS_ONE(1'b1)) u_lut_l (
    .clk(clk), .addr(e_xf[XF_W-2*LUT_AW-1 -: LUT_AW]), .data(lut_l)
  );

  // Taylor section, registered alongside the table reads and aligned to FW
  // fraction bits (weights 2^-28 .. 2^-FW).
  logic             t_valid;
  logic [XT_W-1:0]  t_xt;
  logic [T_W-1:0]   t_y;
  logic [XT_W+7:0]  t_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_xt    <= '0;
    end else begin
      t_valid <= e_valid;
      t_xt    <= e_xf[XT_W-1:0];
    end
  end

  assign t_ext = {t_xt, 8'd0};           // 68 fraction bits
  assign t_y   = t_ext[XT_W+7 -: T_W];

  // ---------------- first multiplier level ----------------
  logic            m1_valid, m2_valid;
  logic [M_W:0]    m1_p;                 // exp(x_M) * exp(x_D)
  logic [LT_W-1:0] m2_q;                 // exp(x_L) * (1 + x_T) - 1

  opt_mult #(.A_W(M_W), .Y_W(D_W), .FW(FW), .STAGES(MUL_STAGES_1)) u_mul_md (
    .clk(clk), .rst_n(rst_n), .in_valid(t_valid), .a(lut_m), .y(lut_d),
    .out_valid(m1_valid), .p(m1_p)
  );

  taylor_mult #(.FW(FW), .STAGES(MUL_STAGES_1)) u_mul_lt (
    .clk(clk), .rst_n(rst_n), .in_valid(t_valid), .l(lut_l), .t(t_y),
    .out_valid(m2_valid), .q(m2_q)
  );

  // ---------------- final multiplier ----------------
  logic          m3_valid;
  logic [M_W:0]  m3_p;

  opt_mult #(.A_W(M_W), .Y_W(LT_W), .FW(FW), .STAGES(MUL_STAGES_2)) u_mul_fin (
    .clk(clk), .rst_n(rst_n), .in_valid(m1_valid), .a(m1_p[M_W-1:0]), .y(m2_q),
    .out_valid(m3_valid), .p(m3_p)
  );

  // ---------------- side band: integer part and special class ----------------
  logic [INT_W-1:0] s_mag;
  logic             s_neg;
  special_e         s_spc;
  logic [1:0]       s_spc_bits;

  pipe_delay #(.W(INT_W + 3), .DEPTH(SIDE_DEPTH)) u_side (
    .clk(clk), .rst_n(rst_n), .d({e_mag, e_neg, e_spc}), .q({s_mag, s_neg, s_spc_bits})
  );
  assign s_spc = special_e'(s_spc_bits);

  // ---------------- adjust and pack ----------------
  logic pk_norm, pk_carry, pk_ovf, pk_unf;

  fp_pack #(.FW(FW)) u_pack (
    .clk(clk), .rst_n(rst_n), .in_valid(m3_valid), .p(m3_p[FW+1:0]),
    .int_mag(s_mag), .int_neg(s_neg), .special(s_spc),
    .out_valid(out_valid), .y(y), .norm_shift(pk_norm), .round_carry(pk_carry),
    .overflow(pk_ovf), .underflow(pk_unf)
  );

endmodule
