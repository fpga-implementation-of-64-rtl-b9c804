// taylor_mult: product of the two smallest factors of exp(xf),
//   exp(x_L) * exp(x_T) ~= (1 + l) * (1 + t) = 1 + l + t + l*t,
// where l = exp(x_L) - 1 < 2^-18 comes from the third table and
// 1 + t, t = x_T < 2^-27, is the first-order Taylor term for the last
// section of the fraction. Because both factors are one plus a small
// number, only the short product l*t needs a multiplier (a reduced-width
// trunc_mult of L_W x T_W bits); the rest is two additions. The leading 1
// is not carried: the output is q = l + t + l*t < 2^-17, with FW fraction
// bits, ready to be the small operand of the final a*(1+q) multiplier.
//
// Interface: a new operand pair every cycle, no stalls; latency STAGES + 1.
// The result is at most one LSB (2^-FW) below the exact value truncated to
// FW bits. The decomposition is the design's (1 + x) Taylor block merged
// with its optimized multiplier of the form (a + x)(1 + y) with a = 1.
module taylor_mult #(
  parameter int unsigned FW     = 57,
  parameter int unsigned STAGES = 9,
  localparam int unsigned L_W   = FW - 18,
  localparam int unsigned T_W   = FW - 27,
  localparam int unsigned Q_W   = FW - 17
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [L_W-1:0] l,
  input  logic [T_W-1:0] t,
  output logic           out_valid,
  output logic [Q_W-1:0] q
);
  localparam int unsigned LT_W = L_W + T_W - FW;

  logic            lt_valid;
  logic [LT_W-1:0] lt;
  logic [L_W-1:0]  l_dly;
  logic [T_W-1:0]  t_dly;

  trunc_mult #(.A_W(L_W), .B_W(T_W), .DROP(FW), .STAGES(STAGES)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(l), .b(t),
    .out_valid(lt_valid), .p(lt)
  );

  pipe_delay #(.W(L_W + T_W), .DEPTH(STAGES)) u_dly (
    .clk(clk), .rst_n(rst_n), .d({l, t}), .q({l_dly, t_dly})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= lt_valid;
      q         <= Q_W'(l_dly) + Q_W'(t_dly) + Q_W'(lt);
    end
  end

endmodule
