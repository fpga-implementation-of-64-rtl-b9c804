// trunc_mult: pipelined reduced-width unsigned multiplier.
//
// Computes approximately (a * b) >> DROP. Partial-product bits in columns
// below CUT = DROP - EXTRA are never generated, so the low part of the
// multiplier array does not exist; EXTRA = clog2(B_W) + 1 columns are kept
// below the output LSB so that the carries lost from the cut columns cost
// less than one output LSB. The result is never above the exact truncated
// product and at most one LSB below it. No error-compensation logic is used;
// accuracy is set by how many guard bits the caller keeps in its formats.
//
// The B_W partial-product rows are accumulated over STAGES pipeline stages,
// spread as evenly as possible. Interface: a new operand pair every cycle,
// no stalls; latency STAGES cycles (in_valid travels along as out_valid).
// Truncating instead of building the full product follows the design; the
// row-per-stage pipeline is this implementation's.
module trunc_mult #(
  parameter int unsigned A_W    = 59,
  parameter int unsigned B_W    = 48,
  parameter int unsigned DROP   = 57,
  parameter int unsigned STAGES = 9,
  localparam int unsigned P_W   = A_W + B_W - DROP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic           out_valid,
  output logic [P_W-1:0] p
);
  localparam int unsigned EXTRA  = $clog2(B_W) + 1;
  localparam int unsigned CUT    = (DROP > EXTRA) ? DROP - EXTRA : 0;
  localparam int unsigned ACC_W  = A_W + B_W - CUT;

  // Row range of stage s: [row_lo(s), row_lo(s+1)).
  function automatic int unsigned row_lo(input int unsigned s);
    return (s * B_W) / STAGES;
  endfunction

  logic [ACC_W-1:0] acc   [STAGES+1];
  logic [A_W-1:0]   a_pl  [STAGES+1];
  logic [B_W-1:0]   b_pl  [STAGES+1];
  logic             v_pl  [STAGES+1];

  assign acc[0]  = '0;
  assign a_pl[0] = a;
  assign b_pl[0] = b;
  assign v_pl[0] = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [ACC_W-1:0] sum;

    always_comb begin
      logic [A_W+B_W-1:0] row;
      sum = acc[s];
      for (int unsigned i = row_lo(s); i < row_lo(s + 1); i++) begin
        row = b_pl[s][i] ? ((A_W+B_W)'(a_pl[s]) << i) : '0;
        sum = sum + ACC_W'(row >> CUT);
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[s+1]  <= '0;
        a_pl[s+1] <= '0;
        b_pl[s+1] <= '0;
        v_pl[s+1] <= 1'b0;
      end else begin
        acc[s+1]  <= sum;
        a_pl[s+1] <= a_pl[s];
        b_pl[s+1] <= b_pl[s];
        v_pl[s+1] <= v_pl[s];
      end
    end
  end

  assign p         = P_W'(acc[STAGES] >> (DROP - CUT));
  assign out_valid = v_pl[STAGES];

endmodule
