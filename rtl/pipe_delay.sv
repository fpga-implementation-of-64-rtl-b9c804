// pipe_delay: fixed-length shift register that carries side-band data
// (valid bits, integer part, special-value flags) alongside the arithmetic
// pipeline so that it arrives together with the datapath result.
// DEPTH = 0 is a wire. Reset clears every stage. A plain helper of this
// implementation; the design only implies that side-band data is pipelined.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end
endmodule
