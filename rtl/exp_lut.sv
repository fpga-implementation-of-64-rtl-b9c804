// exp_lut: 512-entry table of exp() for one 9-bit section of the reduced
// argument.
//
// Entry k holds round(exp(k * 2^-SHIFT) * 2^FW), or that value minus 2^FW
// when MINUS_ONE is set. The three instances of the pipeline use
//   SHIFT =  9 (x_M, bits 2^-1..2^-9):   full value, 2 integer bits;
//   SHIFT = 18 (x_D, bits 2^-10..2^-18): exp()-1 < 2^-9, stored without the
//                                        leading "1.000000000";
//   SHIFT = 27 (x_L, bits 2^-19..2^-27): exp()-1 < 2^-18, likewise.
// Dropping the known leading bits is what lets the following multipliers be
// narrower. The contents are computed when the memory is initialised, from
// the Taylor series of exp in 128-bit fixed point (see exp_pkg::exp_fixed),
// so no data file is needed.
//
// Interface: synchronous read, one cycle latency (block-RAM style, no reset
// on the data register). The three 9-bit-address tables follow the design;
// the entry format is this implementation's.
module exp_lut #(
  parameter int unsigned SHIFT     = 9,
  parameter int unsigned FW        = 57,
  parameter int unsigned DATA_W    = 59,
  parameter bit          MINUS_ONE = 1'b0
) (
  input  logic              clk,
  input  logic [8:0]        addr,
  output logic [DATA_W-1:0] data
);
  import exp_pkg::*;

  logic [DATA_W-1:0] rom [512];

  initial begin
    for (int unsigned k = 0; k < 512; k++) begin
      rom[k] = DATA_W'(exp_fixed(k, SHIFT, FW, MINUS_ONE));
    end
  end

  always_ff @(posedge clk) begin
    data <= rom[addr];
  end

endmodule
