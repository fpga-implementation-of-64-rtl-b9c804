// csd_const_mult: multiplier by a constant coefficient.
//
// The constant is recoded at elaboration time into canonic signed digits
// (digits -1, 0, +1, no two non-zero digits adjacent), which minimises the
// number of non-zero digits. The product is then the sum of the input shifted
// to each +1 digit minus the input shifted to each -1 digit: a short
// add/subtract tree and no general multiplier.
//
// Reduced width: with DROP > 0 the DROP lowest product columns are not
// built. Every shifted term is cut to the kept columns, rounding each +1
// term down and each -1 term up, so the result never exceeds the exact
// (a * CONST) >> DROP and is below it by less than the number of non-zero
// digits. The callers rely on this one-sided error.
//
// Interface: combinational, p = (a * CONST) >> DROP, exact when DROP = 0
// (OUT_W = IN_W + C_W - DROP bits). Using CSD and reduced width for the
// constant multipliers follows the design; the adder-chain form and the
// one-sided rounding are this implementation's.
module csd_const_mult #(
  parameter int unsigned     IN_W  = 18,
  parameter int unsigned     C_W   = 17,
  parameter logic [C_W-1:0]  CONST = C_W'(94548),
  parameter int unsigned     DROP  = 0,
  localparam int unsigned    OUT_W = IN_W + C_W - DROP
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] p
);
  import exp_pkg::*;

  localparam logic [257:0]   DIGITS = csd_digits(128'(CONST), C_W);
  localparam logic [C_W:0]   POS    = DIGITS[C_W:0];
  localparam logic [C_W:0]   NEG    = DIGITS[129+C_W:129];

  localparam int unsigned FULL_W = IN_W + C_W + 1;
  localparam logic [FULL_W-1:0] ROUND_UP = FULL_W'((FULL_W+1)'(1) << DROP) - FULL_W'(1);

  // One extra bit: the top CSD digit may sit one position above the constant.
  logic [OUT_W:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i <= int'(C_W); i++) begin
      if (POS[i]) acc = acc + (OUT_W+1)'((FULL_W'(a) << i) >> DROP);
      if (NEG[i]) acc = acc - (OUT_W+1)'(((FULL_W'(a) << i) + ROUND_UP) >> DROP);
    end
  end

  assign p = acc[OUT_W-1:0];

endmodule
