// exp_eval_tb: checks the range reduction. A stream of random |x| values
// (10.54 fixed point) and signs goes through back to back; for each result,
// 3 cycles later, (+/-int)*ln2 + xf must reproduce x (real arithmetic,
// tolerance 1e-11), xf must lie in [0, 0.75) and for positive x the integer
// must be floor(x*log2(e)) or one below it. The special class must travel
// unchanged. Counts that the estimate correction, sign migration and wrap
// cases all occur.
module exp_eval_tb;
  import exp_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, neg = 0;
  logic [63:0] mag = '0;
  special_e spc_in = SPC_NONE;
  logic out_valid, int_neg, above, mig, wrap;
  logic [10:0] int_mag;
  logic [59:0] xf;
  special_e spc_out;

  exp_eval dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mag(mag), .neg(neg),
                .special_in(spc_in), .out_valid(out_valid), .int_mag(int_mag),
                .int_neg(int_neg), .xf(xf), .special_out(spc_out), .r_above_ln2(above),
                .migrated(mig), .wrapped(wrap));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_above = 0, n_mig = 0, n_wrap = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam real LN2 = 0.69314718055994530942;
  localparam real LOG2E = 1.44269504088896340736;

  real             q_x[$];
  special_e        q_s[$];
  longint unsigned q_t[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real x, got, fr, tol;
      longint fl;
      special_e s;
      longint unsigned t;
      x = q_x.pop_front(); s = q_s.pop_front(); t = q_t.pop_front();
      fr  = real'(xf) / 1152921504606846976.0;
      got = real'(int_mag) * (int_neg ? -LN2 : LN2) + fr;
      tol = 1.0e-11;
      checks++;
      if (cycle - t != 3 || spc_out != s) begin
        failures++;
        $display("FAIL timing/special: x=%g latency=%0d spc=%0d/%0d", x, cycle - t, spc_out, s);
      end else if (s == SPC_NONE) begin
        fl = longint'($floor(x * LOG2E));
        if ((got - x) > tol || (x - got) > tol || fr >= 0.75 ||
            (x >= 0.0 && (longint'(int_mag) > fl || longint'(int_mag) < fl - 1))) begin
          failures++;
          $display("FAIL x=%.17g -> int=%s%0d xf=%.17g (recon %.17g)", x,
                   int_neg ? "-" : "+", int_mag, fr, got);
        end
      end
      if (above) n_above++;
      if (mig) n_mig++;
      if (wrap) n_wrap++;
    end
  end

  task automatic issue(input logic [63:0] m, input logic n, input special_e s);
    real v;
    @(negedge clk);
    mag = m; neg = n; spc_in = s; in_valid = 1'b1;
    v = (real'(m[63:32]) * 4294967296.0 + real'(m[31:0])) / 18014398509481984.0;
    q_x.push_back(n ? -v : v);
    q_s.push_back(s);
    q_t.push_back(cycle);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(64'd0, 1'b0, SPC_NONE);
    issue(64'd0, 1'b1, SPC_NONE);
    issue(64'd1 << 54, 1'b1, SPC_NONE);
    issue(64'h00B1_7217_F7D1_CF79, 1'b0, SPC_NONE);   // about ln2
    issue('0, 1'b0, SPC_NAN);
    issue('0, 1'b1, SPC_ZERO);
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] m;
      m = {$urandom, $urandom};
      m = m >> ($urandom % 64);
      issue(m, 1'($urandom), SPC_NONE);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (q_x.size() != 0 || n_above == 0 || n_mig == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL: left=%0d above=%0d migrated=%0d wrapped=%0d", q_x.size(), n_above, n_mig, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
