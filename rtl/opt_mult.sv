// opt_mult: multiplier for an operand of the form 1 + y with y small.
//
// Computes a * (1 + y) = a + a*y, where a and y are fixed point with FW
// fraction bits and y < 2^(Y_W - FW), i.e. the bits of (1 + y) between the
// leading one and y's top bit are all zero. Instead of a full
// A_W x (FW+1) multiplier only an A_W x Y_W reduced-width multiplier
// (trunc_mult) and one adder are built. The pipeline uses it twice:
//   exp(x_M) * (1 + d)            with d = exp(x_D) - 1  (d < 2^-9)
//   (M*D)    * (1 + q)            q = exp(x_L)*(1+x_T) - 1 (q < 2^-17),
//                                 from taylor_mult
//
// Interface: a new operand pair every cycle, no stalls; latency STAGES + 1
// (the multiplier's stages plus the final adder register). The result is at
// most one LSB (2^-FW) below the exact value truncated to FW fraction bits.
// The a + a*y decomposition follows the design.
module opt_mult #(
  parameter int unsigned A_W    = 59,
  parameter int unsigned Y_W    = 48,
  parameter int unsigned FW     = 57,
  parameter int unsigned STAGES = 9,
  localparam int unsigned O_W   = A_W + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [A_W-1:0] a,
  input  logic [Y_W-1:0] y,
  output logic           out_valid,
  output logic [O_W-1:0] p
);
  localparam int unsigned AY_W = A_W + Y_W - FW;

  logic            ay_valid;
  logic [AY_W-1:0] ay;
  logic [A_W-1:0]  a_dly;

  trunc_mult #(.A_W(A_W), .B_W(Y_W), .DROP(FW), .STAGES(STAGES)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(y),
    .out_valid(ay_valid), .p(ay)
  );

  pipe_delay #(.W(A_W), .DEPTH(STAGES)) u_a_dly (
    .clk(clk), .rst_n(rst_n), .d(a), .q(a_dly)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= ay_valid;
      p         <= O_W'(a_dly) + O_W'(ay);
    end
  end

endmodule
