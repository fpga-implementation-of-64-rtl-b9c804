// fp_pack_tb: checks normalisation, rounding, exponent adjust and the
// special cases of the output stage (57 fraction bits). The expected word
// is p/2^57 * 2^(+/-int) evaluated in real arithmetic (round to nearest
// even); the unit rounds ties away from zero, so on an exact tie one unit
// in the last place of difference is accepted. Results below the normal
// range must be +0, above it +inf; the special classes override the data.
// Latency 2. Counts normalisation shifts, rounding carries, overflow and
// underflow.
module fp_pack_tb;
  import exp_pkg::*;
  localparam int unsigned FW = 57;

  logic clk = 0, rst_n = 0, v = 0;
  logic [FW+1:0] p = '0;
  logic [10:0] im = '0;
  logic in_ = 0;
  special_e spc = SPC_NONE;
  logic ov, nrm, cry, ovf, unf;
  logic [63:0] y;

  fp_pack #(.FW(FW)) dut (.clk(clk), .rst_n(rst_n), .in_valid(v), .p(p), .int_mag(im),
                          .int_neg(in_), .special(spc), .out_valid(ov), .y(y),
                          .norm_shift(nrm), .round_carry(cry), .overflow(ovf), .underflow(unf));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_nrm = 0, n_cry = 0, n_ovf = 0, n_unf = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [63:0] qe[$]; bit qtie[$]; longint unsigned qt[$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (nrm) n_nrm++;
      if (cry) n_cry++;
      if (ovf) n_ovf++;
      if (unf) n_unf++;
    end
    if (rst_n && ov) begin
      logic [63:0] e; bit tie; longint unsigned t; longint d;
      e = qe.pop_front(); tie = qtie.pop_front(); t = qt.pop_front();
      d = longint'(y) - longint'(e);
      checks++;
      if (cycle - t != 2 || !(d == 0 || (tie && (d == 1 || d == -1)))) begin
        failures++;
        $display("FAIL y=%h expected %h tie=%0d lat=%0d", y, e, tie, cycle - t);
      end
    end
  end

  task automatic issue(input logic [FW+1:0] pp, input int n, input special_e s);
    real val;
    logic [63:0] e;
    @(negedge clk);
    v = 1'b1; p = pp; im = 11'(n < 0 ? -n : n); in_ = (n < 0); spc = s;
    val = (real'(pp[FW+1:32]) * 4294967296.0 + real'(pp[31:0])) / 144115188075855872.0;
    val = val * (2.0 ** n);
    if (s == SPC_NAN)       e = 64'h7FF8_0000_0000_0000;
    else if (s == SPC_INF)  e = 64'h7FF0_0000_0000_0000;
    else if (s == SPC_ZERO) e = 64'd0;
    else if (val < 2.2250738585072014e-308) e = 64'd0;
    else e = $realtobits(val);            // overflow gives +inf here as well
    qe.push_back(e);
    qtie.push_back(pp[FW+1] ? (pp[5:0] == 6'b100000) : (pp[4:0] == 5'b10000));
    qt.push_back(cycle);
  endtask

  initial begin
    logic [FW+1:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(59'd1 << FW, 0, SPC_NONE);                 // 1.0
    issue(59'd1 << (FW + 1), -1, SPC_NONE);          // 2 * 2^-1 = 1.0
    issue({2'b01, {(FW-1){1'b1}}, 1'b1}, 3, SPC_NONE);  // rounds up to 2.0
    issue(59'd1 << FW, 1023, SPC_NONE);              // 2^1023
    issue(59'd1 << (FW + 1), 1023, SPC_NONE);        // overflow
    issue(59'd1 << FW, -1022, SPC_NONE);             // smallest normal
    issue(59'd1 << FW, -1023, SPC_NONE);             // underflow
    issue(59'd1 << FW, 5, SPC_NAN);
    issue(59'd1 << FW, 5, SPC_INF);
    issue(59'd1 << FW, 5, SPC_ZERO);
    for (int i = 0; i < 6000; i++) begin
      int n;
      r = (FW+2)'({$urandom, $urandom});
      r[FW+1:FW] = ($urandom % 3 == 0) ? 2'b10 : 2'b01;   // [1, 3)
      n = int'($urandom % 2100) - 1050;
      issue(r, n, SPC_NONE);
    end
    @(negedge clk); v = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (qe.size() != 0 || n_nrm == 0 || n_cry == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL: left=%0d norm=%0d carry=%0d ovf=%0d unf=%0d", qe.size(), n_nrm, n_cry, n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
