// exp_lut_tb: reads every entry of the three tables used by the pipeline
// (SHIFT 9, 18, 27 with 57 fraction bits) and compares it with values
// worked out in real arithmetic: exp(k*2^-9) directly (tolerance set by
// double precision, 128 units of 2^-57), and exp(t)-1 for the two small
// sections from its series t + t^2/2 + ... (tolerance 2 units). Read
// latency must be one cycle.
module exp_lut_tb;
  localparam int unsigned FW = 57;
  logic clk = 0;
  logic [8:0] addr = '0;
  logic [FW+1:0]  dm;
  logic [FW-10:0] dd;
  logic [FW-19:0] dl;

  exp_lut #(.SHIFT(9),  .FW(FW), .DATA_W(FW+2),  .MINUS_ONE(1'b0)) lut_m (.clk(clk), .addr(addr), .data(dm));
  exp_lut #(.SHIFT(18), .FW(FW), .DATA_W(FW-9),  .MINUS_ONE(1'b1)) lut_d (.clk(clk), .addr(addr), .data(dd));
  exp_lut #(.SHIFT(27), .FW(FW), .DATA_W(FW-18), .MINUS_ONE(1'b1)) lut_l (.clk(clk), .addr(addr), .data(dl));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real S57 = 144115188075855872.0;   // 2^57

  function automatic real expm1_small(input real t);
    return t * (1.0 + t / 2.0 * (1.0 + t / 3.0 * (1.0 + t / 4.0 * (1.0 + t / 5.0 * (1.0 + t / 6.0)))));
  endfunction

  function automatic real u2r(input logic [63:0] v);
    return real'(v[63:32]) * 4294967296.0 + real'(v[31:0]);
  endfunction

  initial begin
    real em, ed, el, gm, gd, gl;
    for (int k = 0; k < 512; k++) begin
      @(negedge clk);
      addr = 9'(k);
      @(negedge clk);
      em = $exp(real'(k) / 512.0) * S57;
      ed = expm1_small(real'(k) / 262144.0) * S57;
      el = expm1_small(real'(k) / 134217728.0) * S57;
      gm = u2r(64'(dm)); gd = u2r(64'(dd)); gl = u2r(64'(dl));
      checks += 3;
      if (gm - em > 128.0 || em - gm > 128.0) begin
        failures++; $display("FAIL M[%0d] %h vs %f", k, dm, em);
      end
      if (gd - ed > 2.0 || ed - gd > 2.0) begin
        failures++; $display("FAIL D[%0d] %h vs %f", k, dd, ed);
      end
      if (gl - el > 2.0 || el - gl > 2.0) begin
        failures++; $display("FAIL L[%0d] %h vs %f", k, dl, el);
      end
    end
    // Exact entries.
    checks++;
    addr = 9'd0;
    @(negedge clk);
    if (dm != (59'd1 << FW) || dd != 0 || dl != 0) begin
      failures++; $display("FAIL entry 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
