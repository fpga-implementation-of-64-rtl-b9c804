// exp64_tb: end-to-end test of the double-precision exp() pipeline at its
// default parameters (4 guard bits, 27-cycle latency).
//
// Streams directed and random arguments into the unit, mostly back to back
// with occasional idle cycles, and checks every result against the
// simulator's double-precision exp():
//   * NaN in -> quiet NaN; reference +inf -> +inf; reference below the
//     smallest normal double -> +0 (the unit flushes to zero);
//   * otherwise the result must be within MAX_ULP units in the last place.
// Each result must appear exactly LATENCY cycles after its argument.
// The test also counts how often each mechanism of the unit was exercised
// (sign migration, the wrap case of the sign logic, the low-precision
// integer estimate being corrected, the normalisation shift, a rounding
// carry, datapath overflow and underflow, special inputs) and counts a
// failure for any that never happened.
module exp64_tb;
  localparam int LATENCY  = 27;
  localparam int N_RANDOM = 30000;
  localparam int MAX_ULP  = 2;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [63:0] x = '0;
  logic        out_valid;
  logic [63:0] y;

  exp64 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
             .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Outstanding arguments and the cycle each was issued.
  logic [63:0]     q_x[$];
  longint unsigned q_t[$];

  // Mechanism counters.
  int n_migrated = 0, n_wrapped = 0, n_corrected = 0, n_norm = 0, n_carry = 0;
  int n_ovf = 0, n_unf = 0, n_special = 0;
  int max_ulp_seen = 0;
  real ulp_sum = 0.0;
  int  ulp_cnt = 0;

  function automatic logic [63:0] expected(input logic [63:0] a);
    real r;
    if (a[62:52] == 11'h7FF && a[51:0] != 0) return 64'h7FF8_0000_0000_0000;
    r = $exp($bitstoreal(a));
    if (r < 2.2250738585072014e-308) return 64'd0;
    return $realtobits(r);
  endfunction

  // Compare one result; returns the ULP distance (or a large value).
  task automatic check_result(input logic [63:0] a, input logic [63:0] got,
                              input longint unsigned t_in);
    logic [63:0] exp_bits;
    longint d;
    checks++;
    if (cycle - t_in != 64'(LATENCY)) begin
      failures++;
      $display("FAIL latency: x=%h took %0d cycles", a, cycle - t_in);
    end
    exp_bits = expected(a);
    if (exp_bits == 64'h7FF8_0000_0000_0000 || exp_bits == 64'h7FF0_0000_0000_0000 ||
        exp_bits == 64'd0) begin
      if (got != exp_bits) begin
        failures++;
        $display("FAIL special: x=%h (%g) got %h expected %h", a, $bitstoreal(a), got, exp_bits);
      end
    end else begin
      d = longint'(got) - longint'(exp_bits);
      if (d < 0) d = -d;
      if (d > longint'(MAX_ULP)) begin
        failures++;
        $display("FAIL value: x=%h (%g) got %h (%g) expected %h (%g) ulp=%0d",
                 a, $bitstoreal(a), got, $bitstoreal(got), exp_bits, $bitstoreal(exp_bits), d);
      end else begin
        if (int'(d) > max_ulp_seen) max_ulp_seen = int'(d);
        ulp_sum += real'(d);
        ulp_cnt++;
      end
    end
  endtask

  // Output side: match results in order and count mechanisms.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_eval.out_valid) begin
        if (dut.u_eval.migrated)    n_migrated++;
        if (dut.u_eval.wrapped)     n_wrapped++;
        if (dut.u_eval.r_above_ln2 && !dut.u_eval.int_neg) n_corrected++;
      end
      if (dut.pk_norm)  n_norm++;
      if (dut.pk_carry) n_carry++;
      if (dut.pk_ovf)   n_ovf++;
      if (dut.pk_unf)   n_unf++;
      if (out_valid) begin
        if (q_x.size() == 0) begin
          failures++;
          $display("FAIL: result without an argument");
        end else begin
          check_result(q_x.pop_front(), y, q_t.pop_front());
        end
      end
    end
  end

  task automatic issue(input logic [63:0] a);
    @(negedge clk);
    x        = a;
    in_valid = 1'b1;
    q_x.push_back(a);
    q_t.push_back(cycle);       // latency counted in clock edges
    if (a[62:52] == 11'h7FF || a[62:52] >= 11'd1033) n_special++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  function automatic logic [63:0] rand_in_range(input real lo, input real hi);
    real u;
    u = real'($urandom) / 4294967296.0 + real'($urandom) / 18446744073709551616.0;
    return $realtobits(lo + (hi - lo) * u);
  endfunction

  function automatic logic [63:0] rand_small();
    logic [63:0] v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(1023 - 1 - ($urandom % 62));   // |x| in [2^-62, 1)
    return v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Directed arguments.
    issue($realtobits(0.0));
    issue($realtobits(-0.0));
    issue($realtobits(1.0));
    issue($realtobits(-1.0));
    issue(64'h3FE6_2E42_FEFA_39EF);      // ln2 rounded: result rounds up to 2.0
    issue(64'h3FF6_2E42_FEFA_39EF);      // 2*ln2 rounded: result 4.0
    issue($realtobits(0.5));
    issue($realtobits(-0.5));
    issue($realtobits(10.0));
    issue($realtobits(-10.0));
    issue($realtobits(700.0));
    issue($realtobits(709.78));
    issue($realtobits(-708.0));
    issue($realtobits(709.8));           // overflow in the datapath
    issue($realtobits(800.0));
    issue($realtobits(-709.5));          // underflow in the datapath
    issue($realtobits(-1000.0));
    issue($realtobits(1.0e-20));
    issue($realtobits(-1.0e-20));
    issue($realtobits(3.0e-9));
    issue(64'h7FF0_0000_0000_0000);      // +inf
    issue(64'hFFF0_0000_0000_0000);      // -inf
    issue(64'h7FF8_0000_0000_0001);      // NaN
    issue($realtobits(2000.0));
    issue($realtobits(-2000.0));
    issue(64'h0000_0000_0000_0001);      // subnormal
    idle();

    for (int i = 0; i < N_RANDOM; i++) begin
      int sel;
      sel = $urandom % 16;
      if ($urandom % 8 == 0) idle();
      if (sel < 8)       issue(rand_in_range(-745.0, 710.0));
      else if (sel < 11) issue(rand_in_range(-3.0, 3.0));
      else if (sel < 15) issue(rand_small());
      else               issue({$urandom, $urandom});
    end
    idle();
    repeat (LATENCY + 5) @(negedge clk);

    if (q_x.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q_x.size());
    end

    $display("mechanisms: migrated=%0d wrapped=%0d corrected=%0d norm_shift=%0d round_carry=%0d overflow=%0d underflow=%0d special_in=%0d",
             n_migrated, n_wrapped, n_corrected, n_norm, n_carry, n_ovf, n_unf, n_special);
    $display("accuracy: max %0d ulp, mean %f ulp over %0d ordinary results",
             max_ulp_seen, (ulp_cnt != 0) ? ulp_sum / ulp_cnt : 0.0, ulp_cnt);
    checks += 8;
    if (n_migrated == 0)  begin failures++; $display("FAIL: sign migration never happened"); end
    if (n_wrapped == 0)   begin failures++; $display("FAIL: sign-logic wrap never happened"); end
    if (n_corrected == 0) begin failures++; $display("FAIL: integer estimate never corrected"); end
    if (n_norm == 0)      begin failures++; $display("FAIL: normalisation shift never happened"); end
    if (n_carry == 0)     begin failures++; $display("FAIL: rounding carry never happened"); end
    if (n_ovf == 0)       begin failures++; $display("FAIL: overflow never happened"); end
    if (n_unf == 0)       begin failures++; $display("FAIL: underflow never happened"); end
    if (n_special == 0)   begin failures++; $display("FAIL: special input never seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (N_RANDOM * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
