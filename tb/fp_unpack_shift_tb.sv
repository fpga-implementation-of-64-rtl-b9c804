// fp_unpack_shift_tb: checks the input stage.
// Random and directed doubles; the expected fixed-point value is worked out
// with real arithmetic (floor(|x| * 2^54), exact for |x| < 2^9 and split in
// two 32-bit halves), the special class from the IEEE-754 rules. Latency 1.
module fp_unpack_shift_tb;
  import exp_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] x = '0;
  logic out_valid, neg;
  logic [63:0] mag;
  special_e special;

  fp_unpack_shift dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                       .out_valid(out_valid), .mag(mag), .neg(neg), .special(special));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [63:0] ref_mag(input real v);
    real a, hi, lo;
    a  = (v < 0.0) ? -v : v;
    a  = $floor(a * 18014398509481984.0);     // 2^54
    hi = $floor(a / 4294967296.0);
    lo = a - hi * 4294967296.0;
    return {32'(longint'(hi)), 32'(longint'(lo))};
  endfunction

  task automatic apply(input logic [63:0] v, input logic [63:0] e_mag, input special_e e_spc);
    @(negedge clk);
    x = v; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || special != e_spc || neg != v[63] ||
        (e_spc == SPC_NONE && mag != e_mag)) begin
      failures++;
      $display("FAIL x=%h: valid=%b mag=%h (exp %h) spc=%0d (exp %0d) neg=%b",
               v, out_valid, mag, e_mag, special, e_spc, neg);
    end
  endtask

  initial begin
    real r;
    logic [63:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply($realtobits(1.0),   64'h0040_0000_0000_0000, SPC_NONE);
    apply($realtobits(-2.5),  64'h00A0_0000_0000_0000, SPC_NONE);
    apply($realtobits(1000.0), 64'd1000 << 54, SPC_NONE);
    apply($realtobits(1023.5), 64'hFFE0_0000_0000_0000, SPC_NONE);
    apply($realtobits(1024.0), '0, SPC_INF);
    apply($realtobits(-1024.0), '0, SPC_ZERO);
    apply(64'h7FF0_0000_0000_0000, '0, SPC_INF);
    apply(64'hFFF0_0000_0000_0000, '0, SPC_ZERO);
    apply(64'h7FF0_0000_0000_0001, '0, SPC_NAN);
    apply(64'hFFF8_0000_0000_0000, '0, SPC_NAN);
    apply(64'h0000_0000_0000_0001, '0, SPC_NONE);
    apply($realtobits(0.0), '0, SPC_NONE);
    apply($realtobits(1.0e-14), 64'd180, SPC_NONE);   // floor(1e-14 * 2^54)
    for (int i = 0; i < 3000; i++) begin
      v = {$urandom, $urandom};
      v[62:52] = 11'(1023 - 60 + ($urandom % 69));  // 2^-60 .. 2^8
      r = $bitstoreal(v);
      apply(v, ref_mag(r), SPC_NONE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
