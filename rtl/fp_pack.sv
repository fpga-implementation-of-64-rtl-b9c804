// fp_pack: exponent adjust and conversion of the result to IEEE-754.
//
// Input is the mantissa product p = exp(xf) in [1, e) with FW fraction bits,
// the signed integer part (11-bit magnitude and sign) and the special-value
// class decided at the input. Two stages:
//   A: if p >= 2 the mantissa is shifted right by one and the exponent
//      raised by one; the 52-bit fraction is rounded to nearest (ties away
//      from zero) using the FW-52 bits below it, a carry out of the
//      rounding raises the exponent once more; the biased exponent
//      E = 1023 +/- int + adjustments is formed.
//   B: E >= 2047 gives +inf (overflow), E <= 0 gives +0 (results below the
//      normal range are flushed to zero), the special classes override,
//      otherwise {0, E, fraction}. The sign bit of exp() is always 0.
//
// Interface: one result per cycle, no stalls, latency 2. Status outputs
// report the normalisation shift, a rounding carry, overflow and underflow
// for the result in y. The exponent adjust block and the positive output
// word follow the design; rounding mode, flush-to-zero and the NaN pattern
// (quiet NaN 0x7FF8000000000000) are this implementation's choices.
module fp_pack
  import exp_pkg::*;
#(
  parameter int unsigned FW = 57
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FW+1:0]     p,
  input  logic [INT_W-1:0]  int_mag,
  input  logic              int_neg,
  input  special_e          special,
  output logic              out_valid,
  output logic [63:0]       y,
  output logic              norm_shift,
  output logic              round_carry,
  output logic              overflow,
  output logic              underflow
);
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000;

  // ---------------- stage A ----------------
  logic [FW-1:0]  f;
  logic [FW:0]    rnd;
  logic           nrm, cry;
  logic signed [13:0] e_a;

  always_comb begin
    nrm = p[FW+1];
    f   = nrm ? p[FW:1] : p[FW-1:0];
    rnd = {1'b0, f} + ((FW+1)'(1) << (FW - 53));
    cry = rnd[FW];
    e_a = 14'sd1023 + (int_neg ? -$signed({3'b000, int_mag}) : $signed({3'b000, int_mag}))
        + $signed({13'd0, nrm}) + $signed({13'd0, cry});
  end

  logic               a_valid, a_nrm, a_cry;
  logic [51:0]        a_frac;
  logic signed [13:0] a_exp;
  special_e           a_spc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_nrm <= 1'b0; a_cry <= 1'b0; a_frac <= '0; a_exp <= '0;
      a_spc <= SPC_NONE;
    end else begin
      a_valid <= in_valid;
      a_nrm   <= nrm;
      a_cry   <= cry;
      a_frac  <= rnd[FW-1 -: 52];
      a_exp   <= e_a;
      a_spc   <= special;
    end
  end

  // ---------------- stage B ----------------
  logic [63:0] y_b;
  logic        ovf_b, unf_b;

  always_comb begin
    ovf_b = 1'b0;
    unf_b = 1'b0;
    unique case (a_spc)
      SPC_NAN:  y_b = QNAN;
      SPC_INF:  y_b = PINF;
      SPC_ZERO: y_b = '0;
      default: begin
        if (a_exp >= 14'sd2047) begin
          y_b   = PINF;
          ovf_b = 1'b1;
        end else if (a_exp <= 14'sd0) begin
          y_b   = '0;
          unf_b = 1'b1;
        end else begin
          y_b   = {1'b0, a_exp[10:0], a_frac};
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0; norm_shift <= 1'b0; round_carry <= 1'b0;
      overflow <= 1'b0; underflow <= 1'b0;
    end else begin
      out_valid   <= a_valid;
      y           <= y_b;
      norm_shift  <= a_valid && a_nrm && (a_spc == SPC_NONE);
      round_carry <= a_valid && a_cry && (a_spc == SPC_NONE);
      overflow    <= a_valid && ovf_b;
      underflow   <= a_valid && unf_b;
    end
  end

endmodule
